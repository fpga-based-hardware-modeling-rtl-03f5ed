// Self-checking testbench for vel_update.
//
// Runs 100 velocity updates with R = 0.2, t = 1..15 (cycling) and random
// V, X_g, X, and checks every dimension bit-exactly against a reference
//   V' = V * texp(-(R t)) + u/256 * (X_g - X)
// built from correctly rounded single-precision steps, where texp is the
// fifth-order Taylor polynomial and u the next word of a model of the
// random module's shift register. Also checks the start-to-done latency
// of 252 clocks.
module tb_vel_update;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam int D = 10;
  localparam logic [7:0] SEED = 8'h77;
  logic clk = 0, rst = 1, start = 0;
  logic busy, done;
  f32_t r = 32'h3E4C_CCCD, t = 0;
  f32_t v_in [D];
  f32_t xg   [D];
  f32_t x_in [D];
  f32_t v_out [D];
  int checks = 0, failures = 0;
  logic [7:0] model = SEED;

  vel_update #(.D(D), .SEED(SEED)) dut (.clk, .rst, .start, .r, .t, .v_in, .xg, .x_in,
                                       .busy, .done, .v_out);

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
      v_in[d] = 0; xg[d] = 0; x_in[d] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 100; k++) begin
      int lat;
      f32_t vs [D];
      f32_t gs [D];
      f32_t xs [D];
      f32_t tf, e, rn;
      tf = f_from_uint(24'(k % 15 + 1));
      for (int d = 0; d < D; d++) begin
        vs[d] = r2f(20.0 * ($urandom_range(0, 1000000) / 1000000.0) - 10.0);
        gs[d] = r2f(15.0 * ($urandom_range(0, 1000000) / 1000000.0));
        xs[d] = r2f(15.0 * ($urandom_range(0, 1000000) / 1000000.0));
        v_in[d] <= vs[d];
        xg[d]   <= gs[d];
        x_in[d] <= xs[d];
      end
      t <= tf;
      start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!done);
      e = fmul(r, tf);
      e = texp({~e[31], e[30:0]});
      rn = rnd_of(lfsr_word(model));
      for (int d = 0; d < D; d++) begin
        f32_t ex;
        ex = fadd(fmul(e, vs[d]), fmul(rn, fsub(gs[d], xs[d])));
        check(f_same(v_out[d], ex), $sformatf("k %0d dim %0d got %h exp %h", k, d, v_out[d], ex));
      end
      check(lat == 252, $sformatf("latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
