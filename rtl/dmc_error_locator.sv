// dmc_error_locator: finds the erroneous symbols of a fetched DMC word.
//
// Every symbol lies on one horizontal syndrome group and one vertical
// syndrome group (the crossing lines of the error-location map):
//   D'3-0  : H_syn4-0,   V_syn3-0     D'19-16: H_syn14-10, V_syn3-0
//   D'7-4  : H_syn9-5,   V_syn7-4     D'23-20: H_syn19-15, V_syn7-4
//   D'11-8 : H_syn4-0,   V_syn11-8    D'27-24: H_syn14-10, V_syn11-8
//   D'15-12: H_syn9-5,   V_syn15-12   D'31-28: H_syn19-15, V_syn15-12
// A symbol is marked erroneous when both of its groups are non-zero. The
// map is the design's; the AND of the two flags is this implementation's
// reading of it.
//
// Interface: flags from dmc_syndrome_calc; sym_err[s] = symbol s in error.
// Timing: combinational.
module dmc_error_locator
  import dmc_pkg::*;
(
  input  syn_flags_t         flags,
  output logic [NUM_SYM-1:0] sym_err
);

  always_comb
    for (int unsigned s = 0; s < NUM_SYM; s++)
      sym_err[s] = flags.h_nz[hgroup_of(s)] & flags.v_nz[vgroup_of(s)];

endmodule
