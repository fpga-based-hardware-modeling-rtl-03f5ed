// Self-checking testbench for lfsr_rand.
//
// Draws 300 random numbers and checks each one bit-exactly against a
// shift-register model (u/256 for the model's 8-bit word u), checks the
// start-to-done latency of 39 clocks, that every value lies in [0, 1),
// and that 255 consecutive draws produce each of the 255 non-zero words
// exactly once (a maximal-length sequence read in steps of eight bits).
module tb_lfsr_rand;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam logic [7:0] SEED = 8'h3C;
  logic clk = 0, rst = 1, start = 0;
  logic busy, done;
  f32_t rnd;
  int checks = 0, failures = 0;
  logic [7:0] model = SEED;
  bit seen [256];

  lfsr_rand #(.SEED(SEED)) dut (.clk, .rst, .start, .busy, .done, .rnd);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      int lat;
      logic [7:0] u;
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done);
      u = lfsr_word(model);
      check(rnd == rnd_of(u), $sformatf("draw %0d got %h exp %h", k, rnd, rnd_of(u)));
      check(lat == 39, $sformatf("latency %0d", lat));
      check(f2r(rnd) >= 0.0 && f2r(rnd) < 1.0, "range");
      if (k < 255) begin
        check(!seen[u], $sformatf("word %0d repeated", u));
        seen[u] = 1;
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    check(!seen[0], "zero word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
