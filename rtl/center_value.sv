// Center value module of the landmark operator:
//   X_c = sum_i X_i * fitness_i / ( NP * sum_i fitness_i )
// with both sums over the n pigeons still in the population
// (i = 0 .. n-1) and NP the population size parameter (10), not n.
//
// D fp_mac units (one per dimension) accumulate X_i,d * fitness_i and one
// more fp_mac accumulates fitness_i * 1.0. The pigeons are streamed into
// all D+1 MACs together, one per clock. A multiplier then scales the
// fitness sum by NP (as a float constant), and D dividers form the D
// coordinates of X_c at once.
// For n pigeons done is sampled n*(LAT_ADD+1) + LAT_MUL + LAT_DIV + 16
// clocks after start (117 clocks for n = 5); the MAC multiply latency and
// the feeding overlap with the additions.
//
// Interface: pulse start for one clock while idle with n (1..NP), x and fit
// valid; they must hold until done. done pulses for one clock with xc
// valid; xc holds until the next done.
//
// The MAC bank, the extra MAC with the constant 1.0, and the
// dimension-parallel dividers follow the reference design, and so does the
// constant population size NP in the denominator (while the sums run over
// the current n pigeons). Because NP > n after the first halving, X_c is
// pulled towards the origin, which is where this benchmark's optimum lies.
// Applying NP with one multiplication after the fitness MAC is this
// design's own choice.
module center_value
  import pio_pkg::*;
#(
  parameter int unsigned D  = PIO_D,
  parameter int unsigned NP = PIO_NP
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] n,
  input  f32_t       x   [NP][D],
  input  f32_t       fit [NP],
  output logic       busy,
  output logic       done,
  output f32_t       xc  [D]
);
  localparam f32_t F_NP = f_from_uint(24'(NP));

  typedef enum logic [2:0] {S_IDLE, S_FEED, S_ACC, S_SCALE, S_DIV} state_t;
  state_t state;

  logic       mac_start, feed, np_go, np_vld, div_go;
  logic [7:0] n_r, idx;
  logic       mac_done [D+1];
  logic       got      [D+1];
  f32_t       mac_res  [D+1];
  f32_t       num      [D];
  f32_t       fsum, den, den_r;
  f32_t       fa [D+1];
  f32_t       fb [D+1];
  logic       div_vld [D];
  f32_t       quot    [D];
  logic       all_got;

  always_comb begin
    all_got = 1'b1;
    for (int m = 0; m <= D; m++) all_got &= got[m];
  end

  // Operands streamed into the MACs: pigeon idx, dimension m; the last MAC
  // sums the fitness values.
  always_comb begin
    for (int m = 0; m < D; m++) begin
      fa[m] = x[idx < NP ? idx : 0][m];
      fb[m] = fit[idx < NP ? idx : 0];
    end
    fa[D] = fit[idx < NP ? idx : 0];
    fb[D] = F_ONE;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      mac_start <= 1'b0;
      feed      <= 1'b0;
      np_go     <= 1'b0;
      div_go    <= 1'b0;
      done      <= 1'b0;
      n_r       <= '0;
      idx       <= '0;
      fsum      <= F_ZERO;
      den_r     <= F_ONE;
      for (int m = 0; m <= D; m++) got[m] <= 1'b0;
      for (int d = 0; d < D; d++) begin
        num[d] <= F_ZERO;
        xc[d]  <= F_ZERO;
      end
    end else begin
      mac_start <= 1'b0;
      np_go     <= 1'b0;
      div_go    <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_r       <= n;
          mac_start <= 1'b1;
          idx       <= '0;
          for (int m = 0; m <= D; m++) got[m] <= 1'b0;
          state     <= S_FEED;
        end
        S_FEED: begin
          // first clock: MACs take n; then one pigeon per clock
          if (!feed) begin
            feed <= (n_r != 0);
            if (n_r == 0) state <= S_ACC;
          end else begin
            idx <= idx + 8'd1;
            if (idx + 8'd1 == n_r) begin
              feed  <= 1'b0;
              state <= S_ACC;
            end
          end
        end
        S_ACC: begin
          for (int m = 0; m <= D; m++) if (mac_done[m]) got[m] <= 1'b1;
          for (int d = 0; d < D; d++) if (mac_done[d]) num[d] <= mac_res[d];
          if (mac_done[D]) fsum <= mac_res[D];
          if (all_got) begin
            np_go <= 1'b1;
            state <= S_SCALE;
          end
        end
        S_SCALE: if (np_vld) begin
          den_r  <= den;
          div_go <= 1'b1;
          state  <= S_DIV;
        end
        S_DIV: if (div_vld[0]) begin
          xc    <= quot;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  for (genvar m = 0; m <= D; m++) begin : g_mac
    fp_mac u_mac (.clk, .rst, .start(mac_start), .n(n_r), .in_valid(feed),
                  .a(fa[m]), .b(fb[m]), .busy(), .done(mac_done[m]), .result(mac_res[m]));
  end

  fp_mul u_np (.clk, .rst, .in_valid(np_go), .a(fsum), .b(F_NP),
               .out_valid(np_vld), .y(den));

  for (genvar d = 0; d < D; d++) begin : g_div
    fp_div u_div (.clk, .rst, .in_valid(div_go), .a(num[d]), .b(den_r),
                  .out_valid(div_vld[d]), .y(quot[d]));
  end
endmodule
