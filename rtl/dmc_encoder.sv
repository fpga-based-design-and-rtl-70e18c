// dmc_encoder: Decimal Matrix Code encoder for a 32-bit word.
//
// The word is viewed as a 2 x 4 matrix of 4-bit symbols (see dmc_pkg).
// Horizontal redundancy: in each row, the symbols of columns c and c+2 are
// added as integers by a dmc_decimal_adder, giving four 5-bit groups:
//   H4..H0   = D11..D8  + D3..D0
//   H9..H5   = D15..D12 + D7..D4
//   H14..H10 = D27..D24 + D19..D16
//   H19..H15 = D31..D28 + D23..D20
// Vertical redundancy: bitwise parity down each column, V[i] = D[i] ^ D[i+16].
// These equations and the four-adder-plus-XOR structure are the design's
// own. The same encoder is reused by the decoder to regenerate H' and V'
// from fetched data (encoder-reuse technique), so it has no mode input:
// the surrounding logic selects what it encodes.
//
// Interface: d - data in; h - 20 horizontal bits; v - 16 vertical bits.
// Timing: combinational.
module dmc_encoder
  import dmc_pkg::*;
(
  input  data_t  d,
  output hbits_t h,
  output vbits_t v
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS / 2; c++) begin : g_pair
      // symbols (row r, column c) and (row r, column c+2)
      localparam int unsigned S_LO = r * COLS + c;
      localparam int unsigned S_HI = r * COLS + c + COLS / 2;
      localparam int unsigned G    = r * (COLS / 2) + c;
      dmc_decimal_adder u_add (
        .a  (d[S_LO*SYM_W +: SYM_W]),
        .b  (d[S_HI*SYM_W +: SYM_W]),
        .sum(h[G*HSUM_W +: HSUM_W])
      );
    end
  end

  always_comb v = d[V_W-1:0] ^ d[DATA_W-1:V_W];

endmodule
