// dmc_ref_pkg: reference model of the 32-bit Decimal Matrix Code used by
// the testbenches. It is written independently of the RTL: the horizontal
// and vertical check bits are spelled out equation by equation, and the
// symbol-to-syndrome-group map is a literal table, not a formula.
package dmc_ref_pkg;

  typedef struct {
    logic [19:0] h;
    logic [15:0] v;
  } ref_chk_t;

  typedef struct {
    logic [31:0] d;
    logic        err;
    logic [7:0]  sym;
  } ref_dec_t;

  function automatic ref_chk_t ref_encode(input logic [31:0] d);
    ref_chk_t r;
    int unsigned s0, s1, s2, s3;
    s0 = 32'(d[11:8]) + 32'(d[3:0]);
    s1 = 32'(d[15:12]) + 32'(d[7:4]);
    s2 = 32'(d[27:24]) + 32'(d[19:16]);
    s3 = 32'(d[31:28]) + 32'(d[23:20]);
    r.h[4:0]   = s0[4:0];
    r.h[9:5]   = s1[4:0];
    r.h[14:10] = s2[4:0];
    r.h[19:15] = s3[4:0];
    for (int i = 0; i < 16; i++) r.v[i] = d[i] ^ d[i+16];
    return r;
  endfunction

  // Symbol s -> (horizontal group, vertical group), from the location map.
  function automatic int ref_hg(input int s);
    int t[8] = '{0, 1, 0, 1, 2, 3, 2, 3};
    return t[s];
  endfunction
  function automatic int ref_vg(input int s);
    int t[8] = '{0, 1, 2, 3, 0, 1, 2, 3};
    return t[s];
  endfunction

  function automatic ref_dec_t ref_decode(input logic [31:0] d, input logic [19:0] h,
                                          input logic [15:0] v);
    ref_dec_t r;
    ref_chk_t g;
    logic [19:0] hs;
    logic [15:0] vs;
    g  = ref_encode(d);
    hs = h ^ g.h;
    vs = v ^ g.v;
    r.err = (hs != 0) || (vs != 0);
    r.d = d;
    for (int s = 0; s < 8; s++) begin
      logic [4:0] hgrp;
      logic [3:0] vgrp;
      hgrp = hs[5*ref_hg(s) +: 5];
      vgrp = vs[4*ref_vg(s) +: 4];
      r.sym[s] = (hgrp != 0) && (vgrp != 0);
      if (r.sym[s]) r.d[4*s +: 4] = d[4*s +: 4] ^ vgrp;
    end
    return r;
  endfunction

endpackage
