// Self-checking testbench for center_value.
//
// Runs 100 centre computations with n = 1..10 pigeons, positions in
// [0, 15] and fitness values in [2.5, 800], and checks every coordinate
// bit-exactly against
//   X_c,d = (sum_i x_i,d f_i) / ((sum_i f_i) * NP)
// with the sums taken in pigeon order and every step rounded to single
// precision. Also checks the start-to-done latency, n*(LAT_ADD+1) +
// LAT_MUL + LAT_DIV + 16 clocks.
module tb_center_value;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam int D = 10;
  localparam int NP = 10;
  logic clk = 0, rst = 1, start = 0;
  logic [7:0] n = 0;
  logic busy, done;
  f32_t x   [NP][D];
  f32_t fit [NP];
  f32_t xc  [D];
  int checks = 0, failures = 0;

  center_value #(.D(D), .NP(NP)) dut (.clk, .rst, .start, .n, .x, .fit, .busy, .done, .xc);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NP; i++) begin
      fit[i] = 0;
      for (int d = 0; d < D; d++) x[i][d] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 100; k++) begin
      int lat, nn;
      f32_t xs [NP][D];
      f32_t fs [NP];
      f32_t fsum, den;
      nn = k % NP + 1;
      for (int i = 0; i < NP; i++) begin
        fs[i] = r2f(2.5 + 797.5 * ($urandom_range(0, 1000000) / 1000000.0));
        fit[i] <= fs[i];
        for (int d = 0; d < D; d++) begin
          xs[i][d] = r2f(15.0 * ($urandom_range(0, 1000000) / 1000000.0));
          x[i][d] <= xs[i][d];
        end
      end
      n <= 8'(nn);
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done);
      fsum = fs[0];
      for (int i = 1; i < nn; i++) fsum = fadd(fsum, fs[i]);
      den = fmul(fsum, r2f(real'(NP)));
      for (int d = 0; d < D; d++) begin
        f32_t num;
        num = fmul(xs[0][d], fs[0]);
        for (int i = 1; i < nn; i++) num = fadd(num, fmul(xs[i][d], fs[i]));
        check(f_same(xc[d], fdiv(num, den)), $sformatf("n %0d dim %0d got %h exp %h", nn, d,
              xc[d], fdiv(num, den)));
      end
      check(lat == nn * (LAT_ADD + 1) + LAT_MUL + LAT_DIV + 16,
            $sformatf("n %0d latency %0d", nn, lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
