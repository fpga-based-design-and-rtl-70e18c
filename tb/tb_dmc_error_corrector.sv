// tb_dmc_error_corrector: random check that each marked symbol is XORed
// with the vertical syndrome group of its column and every other symbol
// passes unchanged.
module tb_dmc_error_corrector;
  import dmc_ref_pkg::*;
  logic [31:0] din, dout, e;
  logic [15:0] vs;
  logic [7:0]  sym;
  int checks = 0, failures = 0;

  dmc_error_corrector dut (.d_in(din), .v_syn(vs), .sym_err(sym), .d_out(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      din = $urandom; vs = 16'($urandom); sym = 8'($urandom);
      if (n < 8) sym = 8'(1 << n);
      #1;
      e = din;
      for (int s = 0; s < 8; s++) if (sym[s]) e[4*s +: 4] = din[4*s +: 4] ^ vs[4*ref_vg(s) +: 4];
      checks++;
      if (dout !== e) begin
        failures++;
        $display("FAIL din=%h vs=%h sym=%b dout=%h exp %h", din, vs, sym, dout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
