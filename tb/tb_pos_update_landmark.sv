// Self-checking testbench for pos_update_landmark.
//
// Runs 200 landmark moves with random X and X_c in [0, 15] and checks
// every dimension bit-exactly against X + u/256 * (X_c - X) built from
// correctly rounded single-precision steps, u being the next word of a
// model of the random module's shift register. Also checks that the new
// position lies between X and X_c, and the start-to-done latency of 64
// clocks.
module tb_pos_update_landmark;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam int D = 10;
  localparam logic [7:0] SEED = 8'hC3;
  logic clk = 0, rst = 1, start = 0;
  logic busy, done;
  f32_t x_in [D];
  f32_t xc   [D];
  f32_t x_out [D];
  int checks = 0, failures = 0;
  logic [7:0] model = SEED;

  pos_update_landmark #(.D(D), .SEED(SEED)) dut (.clk, .rst, .start, .x_in, .xc, .busy,
                                                .done, .x_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < D; d++) begin
      x_in[d] = 0; xc[d] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      int lat;
      f32_t xs [D];
      f32_t cs [D];
      f32_t rn;
      for (int d = 0; d < D; d++) begin
        xs[d] = r2f(15.0 * ($urandom_range(0, 1000000) / 1000000.0));
        cs[d] = r2f(15.0 * ($urandom_range(0, 1000000) / 1000000.0));
        x_in[d] <= xs[d];
        xc[d]   <= cs[d];
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done);
      rn = rnd_of(lfsr_word(model));
      for (int d = 0; d < D; d++) begin
        f32_t ex;
        real lo, hi;
        ex = fadd(xs[d], fmul(rn, fsub(cs[d], xs[d])));
        check(f_same(x_out[d], ex), $sformatf("k %0d dim %0d got %h exp %h", k, d, x_out[d], ex));
        lo = (f2r(xs[d]) < f2r(cs[d])) ? f2r(xs[d]) : f2r(cs[d]);
        hi = (f2r(xs[d]) < f2r(cs[d])) ? f2r(cs[d]) : f2r(xs[d]);
        check(f2r(x_out[d]) >= lo - 1e-5 && f2r(x_out[d]) <= hi + 1e-5, "between X and X_c");
      end
      check(lat == 64, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
