// dmc_comparator: syndrome comparator of the DMC decoder.
//
// Compares the redundant bits read from memory (H, V) with the ones the
// reused encoder regenerated from the fetched data (H', V') using XOR:
//   V_syn = V xor V'      H_syn = H xor H'
// A syndrome bit is 1 where stored and regenerated bits differ. The XOR
// comparator (rather than a decimal subtractor) is what this design uses.
//
// Interface: h_mem, v_mem stored bits; h_gen, v_gen regenerated bits;
// h_syn, v_syn syndromes. Timing: combinational.
module dmc_comparator
  import dmc_pkg::*;
(
  input  hbits_t h_mem,
  input  vbits_t v_mem,
  input  hbits_t h_gen,
  input  vbits_t v_gen,
  output hbits_t h_syn,
  output vbits_t v_syn
);

  always_comb begin
    h_syn = h_mem ^ h_gen;
    v_syn = v_mem ^ v_gen;
  end

endmodule
