// Self-checking testbench for fp_addsub.
//
// Issues one random operation per clock (random signs, exponents and
// mantissas, plus cancellation and wide-alignment cases) and checks every
// result bit-exactly against a correctly rounded reference computed in
// double precision. Also checks that each result arrives exactly LAT_ADD
// (12) clocks after it was issued.
module tb_fp_addsub;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 4000;
  logic clk = 0, rst = 1;
  logic in_valid = 0, sub = 0;
  f32_t a = 0, b = 0, y;
  logic out_valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  f32_t exp_q[$];
  int   t_q[$];

  fp_addsub dut (.clk, .rst, .in_valid, .sub, .a, .b, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic f32_t rnd_f(int k);
    logic [7:0] e;
    e = 8'(100 + $urandom_range(0, 50));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && !rst) begin
    f32_t e;
    int t;
    e = exp_q.pop_front();
    t = t_q.pop_front();
    checks++;
    if (!f_same(y, e)) begin
      failures++;
      if (failures < 10) $display("mismatch got %h exp %h", y, e);
    end
    checks++;
    if (cyc - t != LAT_ADD) begin
      failures++;
      $display("latency %0d", cyc - t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      f32_t aa, bb;
      logic s;
      aa = rnd_f(k);
      bb = rnd_f(k);
      if (k % 7 == 0) bb = {~aa[31], aa[30:0]};                   // exact cancellation
      if (k % 11 == 0) bb = {aa[31] ^ 1'($urandom), aa[30:2], 2'($urandom)}; // near cancellation
      if (k % 13 == 0) bb = 32'h0;
      s = 1'($urandom);
      a <= aa; b <= bb; sub <= s; in_valid <= 1;
      exp_q.push_back(r2f(s ? f2r(aa) - f2r(bb) : f2r(aa) + f2r(bb)));
      t_q.push_back(cyc + 1);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT_ADD + 3) @(posedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
