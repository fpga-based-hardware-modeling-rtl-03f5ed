// MAC module: pipelined floating-point multiply-accumulate.
//
// Computes result = sum over k of a_k * b_k for a stream of n operand
// pairs, accumulating in order ((0 + p0) + p1) + ... . Multiplication and
// addition are overlapped: each pair entering on in_valid goes straight
// into the multiplier pipeline, finished products wait in a small FIFO,
// and the single adder takes the next product as soon as the previous
// addition has returned. While one product is being added the next ones
// are already being multiplied, and a returning sum is fed straight back
// into the adder with the next product. For n pairs presented back to back,
// done is sampled n*(LAT_ADD+1) + LAT_MUL + 4 clocks after start (64 for
// n = 4), instead of n*(LAT_MUL+LAT_ADD) without the overlap.
//
// Interface: pulse start for one clock with n (number of terms, at most
// FIFO_DEPTH in flight, any number in total); present operand pairs with
// in_valid in any later clocks, at most one per clock. done pulses for one
// clock with result valid after the n-th product has been accumulated;
// n = 0 gives done with +0 on the clock after start.
//
// The multiplier feeding an adder with a feedback path, and the overlap
// of multiplies with additions under a state machine, follow the reference
// design; the product FIFO and the handshake are this design's own choices.
module fp_mac
  import pio_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] n,
  input  logic       in_valid,
  input  f32_t       a,
  input  f32_t       b,
  output logic       busy,
  output logic       done,
  output f32_t       result
);
  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic          running, add_busy, add_go, mul_vld, add_vld;
  logic [7:0]    n_r, added;
  f32_t          prod, acc, add_a, add_b, add_y;
  f32_t          fifo [FIFO_DEPTH];
  logic [AW:0]   wr_ptr, rd_ptr;
  logic          fifo_empty;

  assign fifo_empty = (wr_ptr == rd_ptr);

  always_ff @(posedge clk) begin
    if (rst) begin
      running  <= 1'b0;
      add_busy <= 1'b0;
      add_go   <= 1'b0;
      done     <= 1'b0;
      n_r      <= '0;
      added    <= '0;
      acc      <= F_ZERO;
      add_a    <= F_ZERO;
      add_b    <= F_ZERO;
      result   <= F_ZERO;
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      for (int i = 0; i < FIFO_DEPTH; i++) fifo[i] <= F_ZERO;
    end else begin
      add_go <= 1'b0;
      done   <= 1'b0;
      if (start) begin
        n_r      <= n;
        added    <= '0;
        acc      <= F_ZERO;
        add_busy <= 1'b0;
        wr_ptr   <= '0;
        rd_ptr   <= '0;
        running  <= (n != 8'd0);
        if (n == 8'd0) begin
          result <= F_ZERO;
          done   <= 1'b1;
        end
      end else if (running) begin
        if (mul_vld) begin
          fifo[wr_ptr[AW-1:0]] <= prod;
          wr_ptr <= wr_ptr + 1'b1;
        end
        if (add_vld) begin
          // the sum just returned feeds the next addition directly
          acc   <= add_y;
          added <= added + 8'd1;
          if (added + 8'd1 == n_r) begin
            result   <= add_y;
            done     <= 1'b1;
            running  <= 1'b0;
            add_busy <= 1'b0;
          end else if (!fifo_empty) begin
            add_a  <= add_y;
            add_b  <= fifo[rd_ptr[AW-1:0]];
            rd_ptr <= rd_ptr + 1'b1;
            add_go <= 1'b1;
          end else begin
            add_busy <= 1'b0;
          end
        end else if (!add_busy && !fifo_empty) begin
          add_a    <= acc;
          add_b    <= fifo[rd_ptr[AW-1:0]];
          rd_ptr   <= rd_ptr + 1'b1;
          add_go   <= 1'b1;
          add_busy <= 1'b1;
        end
      end
    end
  end

  assign busy = running;

  fp_mul    u_mul (.clk, .rst, .in_valid(in_valid), .a(a), .b(b),
                   .out_valid(mul_vld), .y(prod));
  fp_addsub u_add (.clk, .rst, .in_valid(add_go), .sub(1'b0), .a(add_a), .b(add_b),
                   .out_valid(add_vld), .y(add_y));

  // A full FIFO would lose a product.
  assert property (@(posedge clk) disable iff (rst)
                   mul_vld && running |-> (wr_ptr - rd_ptr) < (AW+1)'(FIFO_DEPTH));
endmodule
