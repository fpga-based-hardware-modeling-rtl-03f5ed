// Self-checking testbench for fp_mac.
//
// Runs 200 multiply-accumulate jobs of 1 to 16 terms with random float
// operands; the operands arrive back to back or with random gaps. Each
// result is checked bit-exactly against ((0 + a0 b0) + a1 b1) + ...
// computed with correctly rounded single-precision steps. For back-to-back
// jobs the testbench checks that done is sampled LAT_MUL + n*(LAT_ADD+1)
// + 4 clocks after start, which is only possible when multiplications
// overlap the additions. An n = 0 job must give +0.
module tb_fp_mac;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst = 1, start = 0, in_valid = 0;
  logic [7:0] n = 0;
  f32_t a = 0, b = 0, result;
  logic busy, done;
  int checks = 0, failures = 0;

  fp_mac dut (.clk, .rst, .start, .n, .in_valid, .a, .b, .busy, .done, .result);

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
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      int nt, lat;
      bit gaps;
      f32_t acc;
      nt = (k == 0) ? 0 : $urandom_range(1, 16);
      gaps = (k % 2 == 1);
      n <= 8'(nt);
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 1;
      acc = F_ZERO;
      for (int i = 0; i < nt; i++) begin
        f32_t av, bv;
        if (gaps) while ($urandom_range(0, 2) != 0) begin
          in_valid <= 0;
          @(posedge clk);
          lat++;
        end
        av = r2f(30.0 * ($urandom_range(0, 1000000) / 1000000.0) - 5.0);
        bv = r2f(600.0 * ($urandom_range(0, 1000000) / 1000000.0));
        acc = (i == 0) ? fmul(av, bv) : fadd(acc, fmul(av, bv));
        a <= av;
        b <= bv;
        in_valid <= 1;
        @(posedge clk);
        lat++;
        if (done) break;
      end
      in_valid <= 0;
      while (!done) begin
        @(posedge clk);
        lat++;
      end
      check(f_same(result, acc), $sformatf("job %0d n %0d got %h exp %h", k, nt, result, acc));
      if (!gaps && nt > 0)
        check(lat == LAT_MUL + nt * (LAT_ADD + 1) + 4, $sformatf("n %0d latency %0d", nt, lat));
      if (nt == 0) check(result == F_ZERO && lat == 2, "empty job");
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
