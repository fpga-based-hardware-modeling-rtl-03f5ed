// Self-checking testbench for fitness_eval.
//
// Evaluates 200 random positions with coordinates in [0, 15] (and the
// all-zero position, whose fitness is D * 0.25 = 2.5) and checks each
// fitness bit-exactly against a reference that adds the squares in
// dimension order with correctly rounded single-precision steps, and to
// within 1e-5 relative of the exact value. Also checks the start-to-done
// latency of 140 clocks.
module tb_fitness_eval;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam int D = 10;
  logic clk = 0, rst = 1, start = 0;
  logic busy, done;
  f32_t x [D];
  f32_t fit;
  int checks = 0, failures = 0;

  fitness_eval #(.D(D)) dut (.clk, .rst, .start, .x, .busy, .done, .fit);

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
    for (int d = 0; d < D; d++) x[d] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      int lat;
      logic [31:0] xv [];
      real exact;
      xv = new[D];
      exact = 0.0;
      for (int d = 0; d < D; d++) begin
        xv[d] = (k == 0) ? 32'h0 : r2f(15.0 * ($urandom_range(0, 1000000) / 1000000.0));
        x[d] <= xv[d];
        exact += (f2r(xv[d]) + 0.5) * (f2r(xv[d]) + 0.5);
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done);
      check(fit == fitness(xv, D), $sformatf("got %h exp %h", fit, fitness(xv, D)));
      check((f2r(fit) - exact) / exact < 1e-5 && (exact - f2r(fit)) / exact < 1e-5, "accuracy");
      if (k == 0) check(fit == 32'h4020_0000, "fitness at origin is 2.5");
      check(lat == 140, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
