// Updating-best-fitness module: keeps the best fitness and its position.
//
// Holds the best (lowest) fitness found so far and the position X_g that
// produced it. On start the candidate fitness is compared with the stored
// one in a compare unit; if it is lower, the clock enable of the storage
// register is raised and candidate fitness and position are loaded.
// clear sets the stored fitness to +infinity so that the first candidate
// of a run is always taken.
//
// Interface: pulse clear or start for one clock while idle, with fit_in
// and pos_in valid for start. done pulses 3 clocks after start (compare,
// load, done), with updated telling whether the candidate was taken.
// best_fit and best_pos are always readable.
//
// The compare unit feeding the register's clock enable follows the
// reference design; keeping the position next to the fitness, the clear
// input and the exact timing are this design's own choices. Lower is
// better because the benchmark is minimised.
module best_update
  import pio_pkg::*;
#(
  parameter int unsigned D = PIO_D
) (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  input  logic start,
  input  f32_t fit_in,
  input  f32_t pos_in [D],
  output logic busy,
  output logic done,
  output logic updated,
  output f32_t best_fit,
  output f32_t best_pos [D]
);
  typedef enum logic [1:0] {S_IDLE, S_CMP, S_LOAD} state_t;
  state_t state;
  f32_t   cand_fit;
  f32_t   cand_pos [D];
  logic   ce;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      ce       <= 1'b0;
      done     <= 1'b0;
      updated  <= 1'b0;
      cand_fit <= F_INF;
      best_fit <= F_INF;
      for (int d = 0; d < D; d++) begin
        cand_pos[d] <= F_ZERO;
        best_pos[d] <= F_ZERO;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (clear) begin
            best_fit <= F_INF;
          end else if (start) begin
            cand_fit <= fit_in;
            cand_pos <= pos_in;
            state    <= S_CMP;
          end
        end
        S_CMP: begin
          ce    <= f_lt(cand_fit, best_fit);
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (ce) begin
            best_fit <= cand_fit;
            best_pos <= cand_pos;
          end
          updated <= ce;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
