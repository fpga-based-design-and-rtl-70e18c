// dmc_decimal_adder: the "decimal adder" of the DMC encoder.
//
// DMC treats each 4-bit symbol as an unsigned integer ("decimal" in the
// sense of a whole number, not BCD) and adds two of them. The 5-bit result
// keeps the carry, so no information is lost: 1010 + 0110 = 10000. This is
// the adder the design specifies; purely combinational, no clock.
//
// Interface: a, b - 4-bit symbols; sum - a + b, 5 bits.
module dmc_decimal_adder
  import dmc_pkg::*;
(
  input  sym_t              a,
  input  sym_t              b,
  output logic [HSUM_W-1:0] sum
);

  always_comb sum = HSUM_W'(a) + HSUM_W'(b);

endmodule
