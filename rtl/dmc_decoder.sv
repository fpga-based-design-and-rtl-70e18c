// dmc_decoder: Decimal Matrix Code decoder, behind the reused encoder.
//
// Takes the codeword fetched from memory (stored D', H, V) and the redundant
// bits H', V' that the encoder regenerated from D'. The chain is the one of
// the fault-tolerant memory architecture:
//   comparator (XOR)  -> H_syn, V_syn
//   syndrome calc     -> grouped, per-group non-zero flags, err_detected
//   error locator     -> symbols whose H and V groups are both non-zero
//   error corrector   -> D = D' ^ V_syn group, for each located symbol
// The regenerating encoder is not inside this module: under the
// encoder-reuse technique one dmc_encoder serves both the write (encode)
// and the read (decode) path, so it sits in the memory wrapper and feeds
// h_gen / v_gen here.
//
// Interface: cw_mem fetched codeword; h_gen, v_gen regenerated bits;
// d_out corrected data; err_detected; sym_err[7:0] symbols corrected;
// h_syn, v_syn raw syndromes. Timing: combinational.
module dmc_decoder
  import dmc_pkg::*;
(
  input  codeword_t          cw_mem,
  input  hbits_t             h_gen,
  input  vbits_t             v_gen,
  output data_t              d_out,
  output logic               err_detected,
  output logic [NUM_SYM-1:0] sym_err,
  output hbits_t             h_syn,
  output vbits_t             v_syn
);

  syn_flags_t flags;

  dmc_comparator u_cmp (
    .h_mem(cw_mem.h),
    .v_mem(cw_mem.v),
    .h_gen(h_gen),
    .v_gen(v_gen),
    .h_syn(h_syn),
    .v_syn(v_syn)
  );

  dmc_syndrome_calc u_syn (
    .h_syn       (h_syn),
    .v_syn       (v_syn),
    .flags       (flags),
    .err_detected(err_detected)
  );

  dmc_error_locator u_loc (
    .flags  (flags),
    .sym_err(sym_err)
  );

  dmc_error_corrector u_cor (
    .d_in   (cw_mem.d),
    .v_syn  (v_syn),
    .sym_err(sym_err),
    .d_out  (d_out)
  );

endmodule
