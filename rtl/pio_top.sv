// Pigeon-inspired optimisation (PIO) accelerator, top level.
//
// Minimises the benchmark fitness sum_d (x_d + 0.5)^2 over NP pigeons in a
// D-dimensional space with IEEE754 single-precision arithmetic. A control
// unit (the state machine below) owns the pigeon population memory
// (positions, velocities and fitness of all pigeons, held in registers)
// and steps through the algorithm:
//
//   start:     load the initial positions, zero the velocities, forget the
//              best pigeon, population size np = NP
//   EVAL:      NP fitness_eval units evaluate all pigeons in parallel
//   SORT:      bubble_sort orders the pigeons by fitness, best first (the
//              pigeons already discarded get key +inf and stay at the end);
//              REORDER then permutes the population memory accordingly
//   BEST:      best_update compares the best pigeon with the global best
//              X_g and keeps the better one
//   then, while t1 < iter1 (map-and-compass operator), t1 = t1 + 1:
//   VEL/POSC:  NP vel_update units apply Eq. V = V e^(-R t1) + rand (X_g - X)
//              and NP pos_update_compass units X = X + V, all in parallel,
//              then back to EVAL;
//   otherwise, while t2 < iter2 (landmark operator), t2 = t2 + 1:
//   CENTER:    np = max(1, np/2); center_value computes the weighted
//              centre X_c of the np best pigeons, divided by NP times
//              their fitness sum;
//   POSL:      the first np pos_update_landmark units move those pigeons,
//              X = X + rand (X_c - X), then back to EVAL;
//   otherwise FINISH: done pulses, bestvalue / best_pos hold the result.
//
// Interface: pulse start for one clock while busy is low, with r (the
// map-and-compass factor R as a float), iter1, iter2 and init_pos valid;
// init_pos is sampled on that clock. busy stays high until done pulses.
// bestvalue and best_pos always show the best pigeon found so far.
// Timing: about 575 clocks per map-and-compass iteration and about 330 per
// landmark iteration with the default units and D = NP = 10.
//
// From the reference design: the program flow, the population memory,
// one velocity, position and landmark unit per pigeon, the unit structure
// and the default sizes. Own choices: the initial population is supplied
// on init_pos instead of being generated on chip, the population halving
// stops at one pigeon, pigeons are ranked by lowest fitness, and the
// per-pigeon random seeds.
module pio_top
  import pio_pkg::*;
#(
  parameter int unsigned D  = PIO_D,
  parameter int unsigned NP = PIO_NP
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  f32_t       r,
  input  logic [5:0] iter1,
  input  logic [5:0] iter2,
  input  f32_t       init_pos [NP][D],
  output logic       busy,
  output logic       done,
  output f32_t       bestvalue,
  output f32_t       best_pos [D]
);
  localparam int unsigned IW = (NP > 1) ? $clog2(NP) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_EVAL, S_SORT, S_REORDER, S_BEST, S_DECIDE,
    S_VEL, S_POSC, S_CENTER, S_POSL, S_FINISH
  } state_t;

  function automatic logic [7:0] seed_of(input int unsigned i, input int unsigned mul,
                                         input int unsigned add);
    logic [7:0] s;
    s = 8'((i * mul + add) % 256);
    return (s == 8'd0) ? 8'd1 : s;
  endfunction

  state_t      state;
  logic        go;                 // start pulse for the units of a state
  logic [5:0]  t1, t2, it1_r, it2_r;
  logic [7:0]  np_cur;
  f32_t        r_r, t_f;

  // population memory
  f32_t pos [NP][D];
  f32_t vel [NP][D];
  f32_t fit [NP];

  // unit status
  logic pend     [NP];
  logic any_pend;
  logic ev_done  [NP];
  f32_t ev_fit   [NP];
  logic vu_done  [NP];
  f32_t vu_v     [NP][D];
  logic pc_done  [NP];
  f32_t pc_x     [NP][D];
  logic pl_done  [NP];
  f32_t pl_x     [NP][D];
  logic pl_sel   [NP];
  f32_t key_in   [NP];
  logic [IW-1:0] pay_in  [NP];
  f32_t          key_out [NP];
  logic [IW-1:0] pay_out [NP];
  logic sort_done, best_done, best_upd, cv_done, best_clear;
  f32_t xc [D];
  f32_t xg [D];

  always_comb begin
    any_pend = 1'b0;
    for (int i = 0; i < NP; i++) any_pend |= pend[i];
  end

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      key_in[i] = (i < int'(np_cur)) ? fit[i] : F_INF;
      pay_in[i] = IW'(i);
      pl_sel[i] = (i < int'(np_cur));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      go         <= 1'b0;
      done       <= 1'b0;
      best_clear <= 1'b0;
      t1         <= '0;
      t2         <= '0;
      it1_r      <= '0;
      it2_r      <= '0;
      np_cur     <= 8'(NP);
      r_r        <= F_ZERO;
      t_f        <= F_ZERO;
      for (int i = 0; i < NP; i++) begin
        pend[i] <= 1'b0;
        fit[i]  <= F_ZERO;
        for (int d = 0; d < D; d++) begin
          pos[i][d] <= F_ZERO;
          vel[i][d] <= F_ZERO;
        end
      end
    end else begin
      go         <= 1'b0;
      done       <= 1'b0;
      best_clear <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pos        <= init_pos;
          for (int i = 0; i < NP; i++)
            for (int d = 0; d < D; d++) vel[i][d] <= F_ZERO;
          r_r        <= r;
          it1_r      <= iter1;
          it2_r      <= iter2;
          t1         <= '0;
          t2         <= '0;
          np_cur     <= 8'(NP);
          best_clear <= 1'b1;
          go         <= 1'b1;
          for (int i = 0; i < NP; i++) pend[i] <= 1'b1;
          state      <= S_EVAL;
        end
        S_EVAL: begin
          for (int i = 0; i < NP; i++) if (ev_done[i]) begin
            fit[i]  <= ev_fit[i];
            pend[i] <= 1'b0;
          end
          if (!go && !any_pend) begin
            go    <= 1'b1;
            state <= S_SORT;
          end
        end
        S_SORT: if (sort_done) state <= S_REORDER;
        S_REORDER: begin
          for (int i = 0; i < NP; i++) begin
            pos[i] <= pos[pay_out[i]];
            vel[i] <= vel[pay_out[i]];
            fit[i] <= fit[pay_out[i]];
          end
          go    <= 1'b1;
          state <= S_BEST;
        end
        S_BEST: if (best_done) state <= S_DECIDE;
        S_DECIDE: begin
          if (t1 < it1_r) begin
            t1    <= t1 + 6'd1;
            t_f   <= f_from_uint({18'd0, t1 + 6'd1});
            go    <= 1'b1;
            for (int i = 0; i < NP; i++) pend[i] <= 1'b1;
            state <= S_VEL;
          end else if (t2 < it2_r) begin
            t2     <= t2 + 6'd1;
            np_cur <= (np_cur > 8'd1) ? (np_cur >> 1) : 8'd1;
            go     <= 1'b1;
            state  <= S_CENTER;
          end else begin
            done  <= 1'b1;
            state <= S_FINISH;
          end
        end
        S_VEL: begin
          for (int i = 0; i < NP; i++) if (vu_done[i]) begin
            vel[i]  <= vu_v[i];
            pend[i] <= 1'b0;
          end
          if (!go && !any_pend) begin
            go    <= 1'b1;
            for (int i = 0; i < NP; i++) pend[i] <= 1'b1;
            state <= S_POSC;
          end
        end
        S_POSC: begin
          for (int i = 0; i < NP; i++) if (pc_done[i]) begin
            pos[i]  <= pc_x[i];
            pend[i] <= 1'b0;
          end
          if (!go && !any_pend) begin
            go    <= 1'b1;
            for (int i = 0; i < NP; i++) pend[i] <= 1'b1;
            state <= S_EVAL;
          end
        end
        S_CENTER: if (cv_done) begin
          go    <= 1'b1;
          for (int i = 0; i < NP; i++) pend[i] <= pl_sel[i];
          state <= S_POSL;
        end
        S_POSL: begin
          for (int i = 0; i < NP; i++) if (pl_done[i]) begin
            pos[i]  <= pl_x[i];
            pend[i] <= 1'b0;
          end
          if (!go && !any_pend) begin
            go    <= 1'b1;
            for (int i = 0; i < NP; i++) pend[i] <= 1'b1;
            state <= S_EVAL;
          end
        end
        S_FINISH: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---- per-pigeon units (multi-individual parallelism) ----
  for (genvar i = 0; i < NP; i++) begin : g_pigeon
    fitness_eval #(.D(D)) u_eval (
      .clk, .rst, .start(go && state == S_EVAL), .x(pos[i]),
      .busy(), .done(ev_done[i]), .fit(ev_fit[i]));

    vel_update #(.D(D), .SEED(seed_of(i, 37, 1))) u_vel (
      .clk, .rst, .start(go && state == S_VEL), .r(r_r), .t(t_f),
      .v_in(vel[i]), .xg(xg), .x_in(pos[i]),
      .busy(), .done(vu_done[i]), .v_out(vu_v[i]));

    pos_update_compass #(.D(D)) u_posc (
      .clk, .rst, .start(go && state == S_POSC), .x_in(pos[i]), .v(vel[i]),
      .busy(), .done(pc_done[i]), .x_out(pc_x[i]));

    pos_update_landmark #(.D(D), .SEED(seed_of(i, 53, 101))) u_posl (
      .clk, .rst, .start(go && state == S_POSL && pl_sel[i]), .x_in(pos[i]), .xc(xc),
      .busy(), .done(pl_done[i]), .x_out(pl_x[i]));
  end

  // ---- shared units ----
  bubble_sort #(.N(NP), .PW(IW)) u_sort (
    .clk, .rst, .start(go && state == S_SORT), .key_in(key_in), .pay_in(pay_in),
    .busy(), .done(sort_done), .key_out(key_out), .pay_out(pay_out));

  best_update #(.D(D)) u_best (
    .clk, .rst, .clear(best_clear), .start(go && state == S_BEST),
    .fit_in(fit[0]), .pos_in(pos[0]),
    .busy(), .done(best_done), .updated(best_upd), .best_fit(bestvalue), .best_pos(xg));

  center_value #(.D(D), .NP(NP)) u_center (
    .clk, .rst, .start(go && state == S_CENTER), .n(np_cur), .x(pos), .fit(fit),
    .busy(), .done(cv_done), .xc(xc));

  assign best_pos = xg;
endmodule
