// Position update of the map-and-compass operator, for one pigeon:
//   X_i(t) = X_i(t-1) + V_i(t)
//
// D adders, one per dimension, all working at once.
// Latency from start to done: LAT_ADD + 2 clocks (14 with the default
// adder).
//
// Interface: pulse start for one clock while idle with x_in and v valid;
// done pulses for one clock with x_out valid; x_out holds until the next
// done. The dimension-parallel adders follow the reference design; the
// handshake is this design's own choice.
module pos_update_compass
  import pio_pkg::*;
#(
  parameter int unsigned D = PIO_D
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  f32_t x_in [D],
  input  f32_t v    [D],
  output logic busy,
  output logic done,
  output f32_t x_out [D]
);
  logic running, go;
  logic vld [D];
  f32_t xr  [D];
  f32_t vr  [D];
  f32_t sum [D];

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      go      <= 1'b0;
      done    <= 1'b0;
      for (int d = 0; d < D; d++) begin
        xr[d]    <= F_ZERO;
        vr[d]    <= F_ZERO;
        x_out[d] <= F_ZERO;
      end
    end else begin
      go   <= 1'b0;
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          xr      <= x_in;
          vr      <= v;
          go      <= 1'b1;
          running <= 1'b1;
        end
      end else if (vld[0]) begin
        x_out   <= sum;
        done    <= 1'b1;
        running <= 1'b0;
      end
    end
  end

  assign busy = running;

  for (genvar d = 0; d < D; d++) begin : g_dim
    fp_addsub u_add (.clk, .rst, .in_valid(go), .sub(1'b0), .a(xr[d]), .b(vr[d]),
                     .out_valid(vld[d]), .y(sum[d]));
  end
endmodule
