// Pipelined IEEE754 single-precision adder / subtracter.
//
// Computes y = a + b, or y = a - b when sub is set, rounded to nearest even
// (arithmetic in pio_pkg::f_add). A new operation may be issued every clock;
// its result appears with out_valid exactly LAT clocks after in_valid. The
// default depth of 12 clocks is the add and subtract latency of the
// reference design; how the work is spread over the stages is this design's
// own choice (the sum is formed at the input and carried down a register
// chain, leaving retiming to synthesis).
module fp_addsub
  import pio_pkg::*;
#(
  parameter int unsigned LAT = LAT_ADD
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic sub,
  input  f32_t a,
  input  f32_t b,
  output logic out_valid,
  output f32_t y
);
  f32_t res;
  f32_t data_q [LAT];
  logic vld_q  [LAT];

  always_comb res = f_add(a, sub ? {~b[31], b[30:0]} : b);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LAT; i++) begin
        vld_q[i]  <= 1'b0;
        data_q[i] <= '0;
      end
    end else begin
      vld_q[0]  <= in_valid;
      data_q[0] <= res;
      for (int i = 1; i < LAT; i++) begin
        vld_q[i]  <= vld_q[i-1];
        data_q[i] <= data_q[i-1];
      end
    end
  end

  assign out_valid = vld_q[LAT-1];
  assign y         = data_q[LAT-1];
endmodule
