// Compare-and-swap element of the parallel bubble sort.
//
// Purely combinational. Takes two records (a float key and a payload) and
// returns them in order: with DESCENDING = 0 the record with the smaller
// key comes out on lo_* and the other on hi_*; with DESCENDING = 1 the
// larger key comes out first. Equal keys keep their order. The key
// comparison is an IEEE754 less-than (pio_pkg::f_lt).
module swapper
  import pio_pkg::*;
#(
  parameter int unsigned PW = 4,
  parameter bit DESCENDING = 1'b0
) (
  input  f32_t          a_key,
  input  logic [PW-1:0] a_pay,
  input  f32_t          b_key,
  input  logic [PW-1:0] b_pay,
  output f32_t          lo_key,
  output logic [PW-1:0] lo_pay,
  output f32_t          hi_key,
  output logic [PW-1:0] hi_pay
);
  logic swap;
  always_comb begin
    swap   = DESCENDING ? f_lt(a_key, b_key) : f_lt(b_key, a_key);
    lo_key = swap ? b_key : a_key;
    lo_pay = swap ? b_pay : a_pay;
    hi_key = swap ? a_key : b_key;
    hi_pay = swap ? a_pay : b_pay;
  end
endmodule
