// Self-checking testbench for pos_update_compass.
//
// Applies 300 random positions in [0, 15] and velocities in [-20, 20] and
// checks every dimension of X + V bit-exactly against correctly rounded
// single-precision sums, and the start-to-done latency of 14 clocks.
module tb_pos_update_compass;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam int D = 10;
  logic clk = 0, rst = 1, start = 0;
  logic busy, done;
  f32_t x_in [D];
  f32_t v    [D];
  f32_t x_out [D];
  int checks = 0, failures = 0;

  pos_update_compass #(.D(D)) dut (.clk, .rst, .start, .x_in, .v, .busy, .done, .x_out);

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
      x_in[d] = 0;
      v[d] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      int lat;
      f32_t xs [D];
      f32_t vs [D];
      for (int d = 0; d < D; d++) begin
        xs[d] = r2f(15.0 * ($urandom_range(0, 1000000) / 1000000.0));
        vs[d] = r2f(40.0 * ($urandom_range(0, 1000000) / 1000000.0) - 20.0);
        x_in[d] <= xs[d];
        v[d]    <= vs[d];
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done);
      for (int d = 0; d < D; d++)
        check(f_same(x_out[d], fadd(xs[d], vs[d])), $sformatf("dim %0d got %h exp %h", d,
              x_out[d], fadd(xs[d], vs[d])));
      check(lat == 14, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
