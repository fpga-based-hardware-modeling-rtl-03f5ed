// Exponent module: e^x by the fifth-order Taylor polynomial
//   e^x ~ 1 + x + x^2/2! + x^3/3! + x^4/4! + x^5/5!
//
// Two parts, as in the reference design. The exponentiation generator uses
// one multiplier under a small state machine to form x^2 .. x^5, each power
// being the previous one times x. The compute module then divides each
// power by its factorial in one divider and sums the terms in one adder,
// starting from 1 + x. All operations run one after another, so the
// latency from start to done is
//   4*(LAT_MUL+1) + 4*(LAT_DIV+1) + 5*(LAT_ADD+1) + 1  = 218 clocks
// with the default unit latencies.
//
// Interface: pulse start for one clock while idle with x valid; done pulses
// for one clock with y valid; y holds until the next done.
//
// The polynomial order (K = 5) and the split into a multiplier-based power
// generator and an add/divide compute module follow the reference design;
// the strictly sequential schedule is this design's own choice. The
// factorials are constants. Note that, like any truncated Taylor series,
// the result is only accurate for small |x|.
module fp_exp
  import pio_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  f32_t x,
  output logic busy,
  output logic done,
  output f32_t y
);
  localparam int K = 5;
  // k! for k = 2..5 as floats: 2, 6, 24, 120
  localparam f32_t FACT [2:5] = '{32'h4000_0000, 32'h40C0_0000, 32'h41C0_0000, 32'h42F0_0000};

  typedef enum logic [2:0] {S_IDLE, S_MUL, S_DIV, S_ADD} state_t;
  state_t state;
  f32_t   xr;
  f32_t   pw   [2:K];   // powers x^2..x^5, then divided terms
  int unsigned k;

  logic mul_go, mul_vld, div_go, div_vld, add_go, add_vld;
  f32_t mul_a, mul_y, div_a, div_b, div_y, add_a, add_b, add_y;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      xr     <= F_ZERO;
      y      <= F_ZERO;
      k      <= 0;
      done   <= 1'b0;
      mul_go <= 1'b0;
      div_go <= 1'b0;
      add_go <= 1'b0;
      mul_a  <= F_ZERO;
      div_a  <= F_ZERO;
      div_b  <= F_ONE;
      add_a  <= F_ZERO;
      add_b  <= F_ZERO;
      for (int i = 2; i <= K; i++) pw[i] <= F_ZERO;
    end else begin
      done   <= 1'b0;
      mul_go <= 1'b0;
      div_go <= 1'b0;
      add_go <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr     <= x;
          mul_a  <= x;            // x^2 = x * x
          mul_go <= 1'b1;
          k      <= 2;
          state  <= S_MUL;
        end
        S_MUL: if (mul_vld) begin
          pw[k] <= mul_y;
          if (k == K) begin
            div_a  <= pw[2];
            div_b  <= FACT[2];
            div_go <= 1'b1;
            k      <= 2;
            state  <= S_DIV;
          end else begin
            mul_a  <= mul_y;      // next power
            mul_go <= 1'b1;
            k      <= k + 1;
          end
        end
        S_DIV: if (div_vld) begin
          pw[k] <= div_y;
          if (k == K) begin
            add_a  <= F_ONE;
            add_b  <= xr;
            add_go <= 1'b1;
            k      <= 2;
            state  <= S_ADD;
          end else begin
            div_a  <= pw[k+1];
            div_b  <= FACT[k+1];
            div_go <= 1'b1;
            k      <= k + 1;
          end
        end
        S_ADD: if (add_vld) begin
          if (k > K) begin
            y     <= add_y;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            add_a  <= add_y;
            add_b  <= pw[k];
            add_go <= 1'b1;
            k      <= k + 1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  fp_mul    u_mul (.clk, .rst, .in_valid(mul_go), .a(mul_a), .b(xr),
                   .out_valid(mul_vld), .y(mul_y));
  fp_div    u_div (.clk, .rst, .in_valid(div_go), .a(div_a), .b(div_b),
                   .out_valid(div_vld), .y(div_y));
  fp_addsub u_add (.clk, .rst, .in_valid(add_go), .sub(1'b0), .a(add_a), .b(add_b),
                   .out_valid(add_vld), .y(add_y));
endmodule
