// Velocity update of the map-and-compass operator, for one pigeon:
//   V_i(t) = V_i(t-1) * e^(-R t) + rand * (X_g - X_i(t-1))
//
// Structure: one multiplier forms R*t; its sign is flipped and an fp_exp
// unit evaluates e^(-Rt). In parallel, D subtracters form X_g - X_i(t-1)
// and an lfsr_rand unit draws one random number, which D multipliers
// apply to every dimension. When e^(-Rt) is ready, D more multipliers
// scale the old velocity, and D adders combine the two products. All
// dimensions are processed at once; the random number is shared by the
// dimensions of one update.
// The exponent path is the longest: R*t (LAT_MUL), e^(-Rt) (218 clocks),
// V*e^(-Rt) (LAT_MUL), the final add (LAT_ADD) and handshake clocks; done
// is sampled high 252 clocks after start with the default units.
//
// Interface: pulse start for one clock while idle with all inputs valid;
// done pulses for one clock with v_out valid; v_out holds until the next
// done. r and t are floats; t is the iteration number.
//
// The units and their connection follow the reference design; the
// schedule, the per-instance random seed (SEED) and the handshake are this
// design's own choices.
module vel_update
  import pio_pkg::*;
#(
  parameter int unsigned D    = PIO_D,
  parameter logic [7:0]  SEED = 8'hA5
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  f32_t r,
  input  f32_t t,
  input  f32_t v_in [D],
  input  f32_t xg   [D],
  input  f32_t x_in [D],
  output logic busy,
  output logic done,
  output f32_t v_out [D]
);
  logic running;
  logic rt_go, rt_vld, exp_go, exp_done, sub_go, rnd_go, rnd_done;
  logic dec_go, rm_go, add_go;
  logic have_diff, have_rnd, have_dec, have_rm, rm_issued;
  logic sub_vld [D];
  logic dec_vld [D];
  logic rm_vld  [D];
  logic add_vld [D];
  f32_t rr, tr, rt, ex, rnd, rnd_r, ex_r;
  f32_t vr [D];
  f32_t xgr[D];
  f32_t xr [D];
  f32_t diff   [D];
  f32_t diff_r [D];
  f32_t dec    [D];
  f32_t dec_r  [D];
  f32_t rm     [D];
  f32_t rm_r   [D];
  f32_t sum    [D];

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      done      <= 1'b0;
      rt_go     <= 1'b0;
      exp_go    <= 1'b0;
      sub_go    <= 1'b0;
      rnd_go    <= 1'b0;
      dec_go    <= 1'b0;
      rm_go     <= 1'b0;
      add_go    <= 1'b0;
      have_diff <= 1'b0;
      have_rnd  <= 1'b0;
      have_dec  <= 1'b0;
      have_rm   <= 1'b0;
      rm_issued <= 1'b0;
      rr        <= F_ZERO;
      tr        <= F_ZERO;
      rnd_r     <= F_ZERO;
      ex_r      <= F_ZERO;
      for (int d = 0; d < D; d++) begin
        vr[d]     <= F_ZERO;
        xgr[d]    <= F_ZERO;
        xr[d]     <= F_ZERO;
        diff_r[d] <= F_ZERO;
        dec_r[d]  <= F_ZERO;
        rm_r[d]   <= F_ZERO;
        v_out[d]  <= F_ZERO;
      end
    end else begin
      done   <= 1'b0;
      rt_go  <= 1'b0;
      exp_go <= 1'b0;
      sub_go <= 1'b0;
      rnd_go <= 1'b0;
      dec_go <= 1'b0;
      rm_go  <= 1'b0;
      add_go <= 1'b0;
      if (!running) begin
        if (start) begin
          rr        <= r;
          tr        <= t;
          vr        <= v_in;
          xgr       <= xg;
          xr        <= x_in;
          rt_go     <= 1'b1;
          sub_go    <= 1'b1;
          rnd_go    <= 1'b1;
          have_diff <= 1'b0;
          have_rnd  <= 1'b0;
          have_dec  <= 1'b0;
          have_rm   <= 1'b0;
          rm_issued <= 1'b0;
          running   <= 1'b1;
        end
      end else begin
        if (rt_vld) exp_go <= 1'b1;
        if (exp_done) begin
          ex_r   <= ex;
          dec_go <= 1'b1;
        end
        if (sub_vld[0]) begin
          diff_r    <= diff;
          have_diff <= 1'b1;
        end
        if (rnd_done) begin
          rnd_r    <= rnd;
          have_rnd <= 1'b1;
        end
        if (have_diff && have_rnd && !rm_issued) begin
          rm_go     <= 1'b1;
          rm_issued <= 1'b1;
        end
        if (dec_vld[0]) begin
          dec_r    <= dec;
          have_dec <= 1'b1;
        end
        if (rm_vld[0]) begin
          rm_r    <= rm;
          have_rm <= 1'b1;
        end
        if (have_dec && have_rm) begin
          add_go   <= 1'b1;
          have_dec <= 1'b0;
          have_rm  <= 1'b0;
        end
        if (add_vld[0]) begin
          v_out   <= sum;
          done    <= 1'b1;
          running <= 1'b0;
        end
      end
    end
  end

  assign busy = running;

  fp_mul   u_rt  (.clk, .rst, .in_valid(rt_go), .a(rr), .b(tr), .out_valid(rt_vld), .y(rt));
  fp_exp   u_exp (.clk, .rst, .start(exp_go), .x({~rt[31], rt[30:0]}), .busy(),
                  .done(exp_done), .y(ex));
  lfsr_rand #(.SEED(SEED)) u_rnd (.clk, .rst, .start(rnd_go), .busy(), .done(rnd_done), .rnd(rnd));

  for (genvar d = 0; d < D; d++) begin : g_dim
    fp_addsub u_sub (.clk, .rst, .in_valid(sub_go), .sub(1'b1), .a(xgr[d]), .b(xr[d]),
                     .out_valid(sub_vld[d]), .y(diff[d]));
    fp_mul    u_rm  (.clk, .rst, .in_valid(rm_go), .a(rnd_r), .b(diff_r[d]),
                     .out_valid(rm_vld[d]), .y(rm[d]));
    fp_mul    u_dec (.clk, .rst, .in_valid(dec_go), .a(ex_r), .b(vr[d]),
                     .out_valid(dec_vld[d]), .y(dec[d]));
    fp_addsub u_add (.clk, .rst, .in_valid(add_go), .sub(1'b0), .a(dec_r[d]), .b(rm_r[d]),
                     .out_valid(add_vld[d]), .y(sum[d]));
  end
endmodule
