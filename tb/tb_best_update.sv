// Self-checking testbench for best_update.
//
// After clear, feeds 500 random candidates (fitness and position) and
// checks after each one that the stored fitness and position are those
// of the lowest candidate so far, that updated is set exactly when the
// candidate was lower, and that done comes 3 clocks after start. A second
// clear must make the next candidate win whatever its value.
module tb_best_update;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam int D = 10;
  logic clk = 0, rst = 1, clear = 0, start = 0;
  logic busy, done, updated;
  f32_t fit_in = 0;
  f32_t pos_in [D];
  f32_t best_fit;
  f32_t best_pos [D];
  int checks = 0, failures = 0;

  best_update #(.D(D)) dut (.clk, .rst, .clear, .start, .fit_in, .pos_in, .busy, .done,
                            .updated, .best_fit, .best_pos);

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

  task automatic offer(input f32_t f, input bit expect_win, inout f32_t ref_fit,
                       inout f32_t ref_pos [D]);
    int lat;
    f32_t p [D];
    for (int d = 0; d < D; d++) p[d] = $urandom;
    fit_in <= f;
    for (int d = 0; d < D; d++) pos_in[d] <= p[d];
    start  <= 1;
    @(posedge clk);
    start <= 0;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
    end while (!done);
    check(lat == 3, $sformatf("latency %0d", lat));
    check(updated == expect_win, "updated flag");
    if (expect_win) begin
      ref_fit = f;
      ref_pos = p;
    end
    check(best_fit == ref_fit, $sformatf("best %h exp %h", best_fit, ref_fit));
    for (int d = 0; d < D; d++) check(best_pos[d] == ref_pos[d], $sformatf("best position %h %h", best_pos[d], ref_pos[d]));
  endtask

  initial begin
    f32_t ref_fit;
    f32_t ref_pos [D];
    for (int d = 0; d < D; d++) begin
      pos_in[d] = 0;
      ref_pos[d] = 0;
    end
    ref_fit = F_INF;
    repeat (3) @(posedge clk);
    rst <= 0;
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    @(posedge clk);
    for (int k = 0; k < 500; k++) begin
      f32_t f;
      f = r2f(5000.0 * ($urandom_range(0, 1000000) / 1000000.0) / (k + 1));
      offer(f, f_lt(f, ref_fit), ref_fit, ref_pos);
    end
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    @(posedge clk);
    offer(r2f(1.0e30), 1'b1, ref_fit, ref_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
