// dmc_error_corrector: repairs the located symbols of a fetched DMC word.
//
// For every symbol s marked by the error locator, the vertical syndrome
// group of its column says exactly which of its bits differ from the
// column parity, so the symbol is repaired by XOR with that group:
//   D[4s+3:4s] = D'[4s+3:4s] ^ V_syn[4c+3:4c]   (c = column of s)
// Unmarked symbols pass unchanged. The design names this block only; the
// XOR repair is this implementation's choice, the standard one for DMC.
//
// Interface: d_in fetched data; v_syn; sym_err; d_out corrected data.
// Timing: combinational.
module dmc_error_corrector
  import dmc_pkg::*;
(
  input  data_t              d_in,
  input  vbits_t             v_syn,
  input  logic [NUM_SYM-1:0] sym_err,
  output data_t              d_out
);

  always_comb
    for (int unsigned s = 0; s < NUM_SYM; s++)
      d_out[s*SYM_W +: SYM_W] = d_in[s*SYM_W +: SYM_W]
                              ^ ({SYM_W{sym_err[s]}} & v_syn[vgroup_of(s)*SYM_W +: SYM_W]);

endmodule
