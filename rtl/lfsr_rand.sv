// Random module: uniform random float in [0, 1) from an 8-bit LFSR.
//
// An 8-stage shift register x1..x8 shifts towards x8 on every clock; x8 is
// the serial output, and the bit fed back into x1 combines the outputs of
// x4, x5, x6 and x8 (feedback polynomial x^8 + x^6 + x^5 + x^4 + 1, a
// maximal-length sequence of period 255). On start the register steps
// eight times and the eight output bits form one 8-bit word u (first bit
// in the most significant place). u is read as a fixed-point number with a
// zero sign bit, 3 integer bits and 5 fraction bits, i.e. u/32 in [0, 8),
// converted to a float and divided by 8.0 in an fp_div unit, giving
// rnd = u/256.
//
// Interface: pulse start for one clock while idle; done pulses for one
// clock with rnd valid (rnd holds until the next done). done is sampled
// high 8 + 1 + LAT_DIV + 2 = 39 clocks after start was sampled (8 shift
// clocks, 1 conversion clock, the divider and two handshake clocks).
//
// From the reference design: the 8-stage register, its taps, the 9-bit
// sign/3.5 fixed-point reading and the division by eight. Own choices: the
// taps are combined with exclusive-or (the gate type is not specified), the
// seed is a parameter so that parallel instances produce different
// sequences, and the register is held while idle.
module lfsr_rand
  import pio_pkg::*;
#(
  parameter logic [7:0] SEED = 8'hA5
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic busy,
  output logic done,
  output f32_t rnd
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_CONV, S_DIV} state_t;
  state_t     state;
  logic [7:0] sr;      // sr[0] is x1, sr[7] is x8
  logic [7:0] word;
  logic [2:0] cnt;
  logic       fb;
  logic       div_go, div_vld;
  f32_t       fixed_f, quot;

  assign fb = sr[3] ^ sr[4] ^ sr[5] ^ sr[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      sr      <= SEED;
      word    <= '0;
      cnt     <= '0;
      div_go  <= 1'b0;
      fixed_f <= F_ZERO;
      rnd     <= F_ZERO;
      done    <= 1'b0;
    end else begin
      div_go <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SHIFT;
          cnt   <= '0;
        end
        S_SHIFT: begin
          sr   <= {sr[6:0], fb};
          word <= {word[6:0], sr[7]};
          cnt  <= cnt + 3'd1;
          if (cnt == 3'd7) state <= S_CONV;
        end
        S_CONV: begin
          // u / 32 as a float: the integer value with the exponent lowered by 5
          fixed_f <= (word == 8'd0) ? F_ZERO
                   : f_from_uint({16'd0, word}) - {1'b0, 8'd5, 23'd0};
          div_go  <= 1'b1;
          state   <= S_DIV;
        end
        S_DIV: if (div_vld) begin
          rnd   <= quot;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  fp_div u_div (.clk, .rst, .in_valid(div_go), .a(fixed_f), .b(F_EIGHT),
                .out_valid(div_vld), .y(quot));
endmodule
