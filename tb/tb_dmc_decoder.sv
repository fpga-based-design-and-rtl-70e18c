// tb_dmc_decoder: drives the decoder with codewords of random data hit by
// errors, and with H'/V' regenerated from the fetched data by the reference
// encoder (the role the shared encoder plays in the memory). Checks:
//   - no error: data unchanged, no flag;
//   - every single bit flip of the 68-bit codeword: data recovered and the
//     error detected;
//   - every non-zero 4-bit burst in every symbol (multiple cell upset
//     inside one symbol): data recovered, only that symbol corrected;
//   - random multi-symbol errors: outputs equal the reference decoder.
module tb_dmc_decoder;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;
  codeword_t  cw;
  hbits_t     hg, hs;
  vbits_t     vg, vs;
  data_t      dout;
  logic       err;
  logic [7:0] sym;
  int checks = 0, failures = 0;

  dmc_decoder dut (.cw_mem(cw), .h_gen(hg), .v_gen(vg), .d_out(dout), .err_detected(err),
                   .sym_err(sym), .h_syn(hs), .v_syn(vs));

  // Present a stored codeword (original data, then flip mask) to the decoder.
  task automatic apply(input logic [31:0] d, input logic [67:0] flip);
    ref_chk_t c, g;
    c  = ref_encode(d);
    cw = codeword_t'({c.h, c.v, d} ^ flip);
    g  = ref_encode(cw.d);
    hg = g.h; vg = g.v;
    #1;
  endtask

  task automatic expect_out(input logic [31:0] ed, input logic ee, input logic [7:0] es,
                            input string what);
    checks++;
    if (dout !== ed || err !== ee || sym !== es) begin
      failures++;
      $display("FAIL %s: dout=%h exp %h err=%b exp %b sym=%b exp %b", what, dout, ed, err, ee,
               sym, es);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    ref_dec_t r;
    // worked example, no error
    apply(32'hF5AFF6AC, '0);
    expect_out(32'hF5AFF6AC, 1'b0, 8'h0, "example clean");
    for (int n = 0; n < 200; n++) begin
      d = $urandom;
      apply(d, '0);
      expect_out(d, 1'b0, 8'h0, "clean");
    end
    // single bit flips anywhere in the codeword
    for (int b = 0; b < 68; b++) begin
      d = $urandom;
      apply(d, 68'(1) << b);
      checks++;
      if (dout !== d || err !== 1'b1) begin
        failures++;
        $display("FAIL single flip bit %0d: dout=%h exp %h err=%b", b, dout, d, err);
      end
    end
    // one symbol, every non-zero burst pattern
    for (int s = 0; s < 8; s++)
      for (int p = 1; p < 16; p++) begin
        d = $urandom;
        apply(d, 68'(p) << (4 * s));
        expect_out(d, 1'b1, 8'(1 << s), "symbol burst");
      end
    // random multi-symbol and redundancy errors against the reference
    for (int n = 0; n < 2000; n++) begin
      logic [67:0] f;
      d = $urandom;
      f = {4'($urandom) & 4'($urandom), $urandom & $urandom, $urandom & $urandom & $urandom};
      apply(d, f);
      r = ref_decode(cw.d, cw.h, cw.v);
      expect_out(r.d, r.err, r.sym, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
