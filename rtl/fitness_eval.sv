// Evaluation module: fitness(X) = sum over d of (x_d + 0.5)^2.
//
// The benchmark fitness function of the design (a shifted sphere, minimum
// D*0.25 at x = 0 within the search range [0, 15]). Three stages:
//   1. D adders form x_d + 0.5 for all dimensions at once,
//   2. D multipliers square them at once,
//   3. a sum module adds the D squares with a single adder under a state
//      machine, one addition after another: ((s0 + s1) + s2) + ... .
// done is sampled high (LAT_ADD+1) + (LAT_MUL+1) + (D-1)*(LAT_ADD+1) + 1
// clocks after start, 140 clocks for D = 10 with the default latencies.
//
// Interface: pulse start for one clock while idle with x valid; done pulses
// for one clock with fit valid; fit holds until the next done.
//
// The three-stage structure with dimension-parallel add and multiply units
// and a sequential sum module follows the reference design; the schedule
// of the sum is this design's own choice.
module fitness_eval
  import pio_pkg::*;
#(
  parameter int unsigned D = PIO_D
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  f32_t x [D],
  output logic busy,
  output logic done,
  output f32_t fit
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_SQR, S_SUM} state_t;
  state_t state;

  logic add_go, mul_go, sum_go;
  logic add_vld [D];
  logic mul_vld [D];
  logic sum_vld;
  f32_t xr   [D];
  f32_t xh   [D];
  f32_t sq   [D];
  f32_t sq_r [D];
  f32_t sum_a, sum_b, sum_y;
  int unsigned k;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      add_go <= 1'b0;
      mul_go <= 1'b0;
      sum_go <= 1'b0;
      sum_a  <= F_ZERO;
      sum_b  <= F_ZERO;
      fit    <= F_ZERO;
      done   <= 1'b0;
      k      <= 0;
      for (int d = 0; d < D; d++) begin
        xr[d]   <= F_ZERO;
        sq_r[d] <= F_ZERO;
      end
    end else begin
      add_go <= 1'b0;
      mul_go <= 1'b0;
      sum_go <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr     <= x;
          add_go <= 1'b1;
          state  <= S_SHIFT;
        end
        S_SHIFT: if (add_vld[0]) begin
          mul_go <= 1'b1;
          state  <= S_SQR;
        end
        S_SQR: if (mul_vld[0]) begin
          sq_r <= sq;
          if (D == 1) begin
            fit   <= sq[0];
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            sum_a  <= sq[0];
            sum_b  <= sq[1];
            sum_go <= 1'b1;
            k      <= 2;
            state  <= S_SUM;
          end
        end
        S_SUM: if (sum_vld) begin
          if (k >= D) begin
            fit   <= sum_y;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            sum_a  <= sum_y;
            sum_b  <= sq_r[k];
            sum_go <= 1'b1;
            k      <= k + 1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  for (genvar d = 0; d < D; d++) begin : g_dim
    fp_addsub u_add (.clk, .rst, .in_valid(add_go), .sub(1'b0), .a(xr[d]), .b(F_HALF),
                     .out_valid(add_vld[d]), .y(xh[d]));
    fp_mul    u_sqr (.clk, .rst, .in_valid(mul_go), .a(xh[d]), .b(xh[d]),
                     .out_valid(mul_vld[d]), .y(sq[d]));
  end

  fp_addsub u_sum (.clk, .rst, .in_valid(sum_go), .sub(1'b0), .a(sum_a), .b(sum_b),
                   .out_valid(sum_vld), .y(sum_y));
endmodule
