// Position update of the landmark operator, for one pigeon:
//   X_i(t) = X_i(t-1) + rand * (X_c(t) - X_i(t-1))
//
// D subtracters form X_c - X_i(t-1) while an lfsr_rand unit draws one
// random number; D multipliers scale the differences by it and D adders
// add the old position. All dimensions are processed at once; the random
// number is shared by the dimensions of one update.
// done is sampled high 64 clocks after start with the default units: the
// random number (39 clocks), then LAT_MUL, LAT_ADD and handshake clocks.
//
// Interface: pulse start for one clock while idle with x_in and xc valid;
// done pulses for one clock with x_out valid; x_out holds until the next
// done. The units and their connection follow the reference design; the
// schedule, the per-instance random seed (SEED) and the handshake are this
// design's own choices.
module pos_update_landmark
  import pio_pkg::*;
#(
  parameter int unsigned D    = PIO_D,
  parameter logic [7:0]  SEED = 8'h5A
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  f32_t x_in [D],
  input  f32_t xc   [D],
  output logic busy,
  output logic done,
  output f32_t x_out [D]
);
  logic running, sub_go, rnd_go, rnd_done, mul_go, add_go;
  logic have_diff, have_rnd, mul_issued;
  logic sub_vld [D];
  logic mul_vld [D];
  logic add_vld [D];
  f32_t rnd, rnd_r;
  f32_t xr     [D];
  f32_t xcr    [D];
  f32_t diff   [D];
  f32_t diff_r [D];
  f32_t prod   [D];
  f32_t prod_r [D];
  f32_t sum    [D];

  always_ff @(posedge clk) begin
    if (rst) begin
      running    <= 1'b0;
      done       <= 1'b0;
      sub_go     <= 1'b0;
      rnd_go     <= 1'b0;
      mul_go     <= 1'b0;
      add_go     <= 1'b0;
      have_diff  <= 1'b0;
      have_rnd   <= 1'b0;
      mul_issued <= 1'b0;
      rnd_r      <= F_ZERO;
      for (int d = 0; d < D; d++) begin
        xr[d]     <= F_ZERO;
        xcr[d]    <= F_ZERO;
        diff_r[d] <= F_ZERO;
        prod_r[d] <= F_ZERO;
        x_out[d]  <= F_ZERO;
      end
    end else begin
      done   <= 1'b0;
      sub_go <= 1'b0;
      rnd_go <= 1'b0;
      mul_go <= 1'b0;
      add_go <= 1'b0;
      if (!running) begin
        if (start) begin
          xr         <= x_in;
          xcr        <= xc;
          sub_go     <= 1'b1;
          rnd_go     <= 1'b1;
          have_diff  <= 1'b0;
          have_rnd   <= 1'b0;
          mul_issued <= 1'b0;
          running    <= 1'b1;
        end
      end else begin
        if (sub_vld[0]) begin
          diff_r    <= diff;
          have_diff <= 1'b1;
        end
        if (rnd_done) begin
          rnd_r    <= rnd;
          have_rnd <= 1'b1;
        end
        if (have_diff && have_rnd && !mul_issued) begin
          mul_go     <= 1'b1;
          mul_issued <= 1'b1;
        end
        if (mul_vld[0]) begin
          prod_r <= prod;
          add_go <= 1'b1;
        end
        if (add_vld[0]) begin
          x_out   <= sum;
          done    <= 1'b1;
          running <= 1'b0;
        end
      end
    end
  end

  assign busy = running;

  lfsr_rand #(.SEED(SEED)) u_rnd (.clk, .rst, .start(rnd_go), .busy(), .done(rnd_done), .rnd(rnd));

  for (genvar d = 0; d < D; d++) begin : g_dim
    fp_addsub u_sub (.clk, .rst, .in_valid(sub_go), .sub(1'b1), .a(xcr[d]), .b(xr[d]),
                     .out_valid(sub_vld[d]), .y(diff[d]));
    fp_mul    u_mul (.clk, .rst, .in_valid(mul_go), .a(rnd_r), .b(diff_r[d]),
                     .out_valid(mul_vld[d]), .y(prod[d]));
    fp_addsub u_add (.clk, .rst, .in_valid(add_go), .sub(1'b0), .a(xr[d]), .b(prod_r[d]),
                     .out_valid(add_vld[d]), .y(sum[d]));
  end
endmodule
