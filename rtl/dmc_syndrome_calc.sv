// dmc_syndrome_calc: groups the DMC syndromes and flags the non-zero groups.
//
// V_syn (16 bits) is split into four 4-bit groups V_syn[3:0], [7:4], [11:8],
// [15:12] - one per matrix column - and H_syn (20 bits) into four 5-bit
// groups H_syn[4:0], [9:5], [14:10], [19:15] - one per horizontal adder.
// That grouping is the design's. Each group is reduced to a single
// "non-zero" flag (OR of its bits); err_detected is set when any syndrome
// bit is non-zero, which signals an error in the stored word. Reducing the
// groups to flags here, for the error locator, is this implementation's way
// of realising the syndrome calculator.
//
// Interface: h_syn, v_syn in; flags (h_nz[3:0], v_nz[3:0]); err_detected.
// Timing: combinational.
module dmc_syndrome_calc
  import dmc_pkg::*;
(
  input  hbits_t     h_syn,
  input  vbits_t     v_syn,
  output syn_flags_t flags,
  output logic       err_detected
);

  always_comb begin
    for (int g = 0; g < NUM_HG; g++) flags.h_nz[g] = |h_syn[g*HSUM_W +: HSUM_W];
    for (int c = 0; c < COLS; c++)   flags.v_nz[c] = |v_syn[c*SYM_W +: SYM_W];
    err_detected = (|h_syn) | (|v_syn);
  end

endmodule
