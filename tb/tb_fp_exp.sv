// Self-checking testbench for fp_exp.
//
// Evaluates e^x for 200 values of x (random in [-3.2, 1], plus 0 and the
// values -R*t the optimiser uses) and checks each result bit-exactly
// against a reference of the same fifth-order Taylor polynomial evaluated
// with correctly rounded single-precision steps. For |x| <= 0.5 it also
// checks the result against the true e^x to within 1e-4 (the Taylor
// error), and it checks the start-to-done latency of 218 clocks.
module tb_fp_exp;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic busy, done;
  f32_t x = 0, y;
  int checks = 0, failures = 0;

  fp_exp dut (.clk, .rst, .start, .x, .busy, .done, .y);

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
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      int lat;
      real xr;
      if (k == 0) xr = 0.0;
      else if (k <= 15) xr = -0.2 * k;
      else xr = -3.2 + 4.2 * ($urandom_range(0, 1000000) / 1000000.0);
      x <= r2f(xr);
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done);
      check(y == texp(r2f(xr)), $sformatf("x=%f got %h exp %h", xr, y, texp(r2f(xr))));
      check(lat == 218, $sformatf("latency %0d", lat));
      if (xr <= 0.5 && xr >= -0.5) begin
        real e, d;
        e = $exp(f2r(r2f(xr)));
        d = f2r(y) - e;
        check(d < 1.0e-4 && d > -1.0e-4, $sformatf("x=%f far from exp: %f", xr, f2r(y)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
