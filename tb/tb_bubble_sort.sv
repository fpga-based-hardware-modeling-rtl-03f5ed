// Self-checking testbench for bubble_sort.
//
// A descending instance sorts the ten-number example of the algorithm's
// description (3 5 1 4 2 9 0 8 7 6); the testbench checks the state after
// the first even phase (5 3 4 1 9 2 8 0 7 6) and after the first odd phase
// (5 4 3 9 1 8 2 7 0 6), and the final order. An ascending instance, the
// configuration used by the optimiser, sorts 300 random float arrays (with
// ties and +infinity entries); every output must be in order, be a
// permutation of the input carried with its payload, and keep equal keys
// in input order. Both check the start-to-done latency of N + 1 = 11
// clocks.
module tb_bubble_sort;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 10;
  localparam int PW = 4;
  logic clk = 0, rst = 1;
  logic start_d = 0, start_a = 0;
  logic busy_d, done_d, busy_a, done_a;
  f32_t          key_in [N];
  logic [PW-1:0] pay_in [N];
  f32_t          kd [N];
  f32_t          ka [N];
  logic [PW-1:0] pd [N];
  logic [PW-1:0] pa [N];
  int checks = 0, failures = 0;

  bubble_sort #(.N(N), .PW(PW), .DESCENDING(1'b1)) dut_d (
    .clk, .rst, .start(start_d), .key_in, .pay_in, .busy(busy_d), .done(done_d),
    .key_out(kd), .pay_out(pd));
  bubble_sort #(.N(N), .PW(PW), .DESCENDING(1'b0)) dut_a (
    .clk, .rst, .start(start_a), .key_in, .pay_in, .busy(busy_a), .done(done_a),
    .key_out(ka), .pay_out(pa));

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
    int ex0 [N] = '{3, 5, 1, 4, 2, 9, 0, 8, 7, 6};
    int ex1 [N] = '{5, 3, 4, 1, 9, 2, 8, 0, 7, 6};
    int ex2 [N] = '{5, 4, 3, 9, 1, 8, 2, 7, 0, 6};
    int lat;
    for (int i = 0; i < N; i++) begin
      key_in[i] = f_from_uint(24'(ex0[i]));
      pay_in[i] = PW'(i);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // ---- example of the description, descending ----
    start_d <= 1;
    @(posedge clk);              // load
    start_d <= 0;
    @(posedge clk);              // first (even) phase
    #1;
    for (int i = 0; i < N; i++)
      check(kd[i] == f_from_uint(24'(ex1[i])), $sformatf("even phase pos %0d", i));
    @(posedge clk);              // first odd phase
    #1;
    for (int i = 0; i < N; i++)
      check(kd[i] == f_from_uint(24'(ex2[i])), $sformatf("odd phase pos %0d", i));
    lat = 2;
    while (!done_d) begin
      @(posedge clk);
      lat++;
    end
    check(lat == 11, $sformatf("latency %0d", lat));
    for (int i = 0; i < N; i++) begin
      check(kd[i] == f_from_uint(24'(9 - i)), $sformatf("final pos %0d", i));
      check(f2r(key_in[pd[i]]) == real'(9 - i), "payload follows key");
    end
    // ---- random arrays, ascending ----
    for (int k = 0; k < 300; k++) begin
      real v [N];
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(0, 9))
          0: key_in[i] = F_INF;
          1: key_in[i] = 32'h4020_0000;   // repeated value 2.5
          default: key_in[i] = r2f(1000.0 * ($urandom_range(0, 1000000) / 1000000.0));
        endcase
        pay_in[i] = PW'(i);
      end
      @(posedge clk);
      start_a <= 1;
      @(posedge clk);
      start_a <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done_a);
      check(lat == 11, $sformatf("latency %0d", lat));
      for (int i = 0; i < N; i++) begin
        check(ka[i] == key_in[pa[i]], "payload follows key");
        if (i > 0) begin
          check(!f_lt(ka[i], ka[i-1]), $sformatf("order at %0d", i));
          if (ka[i] == ka[i-1]) check(pa[i] > pa[i-1], "stable for equal keys");
        end
        for (int j = 0; j < i; j++) check(pa[i] != pa[j], "permutation");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
