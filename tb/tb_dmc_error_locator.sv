// tb_dmc_error_locator: exhaustive check (all 256 combinations of the
// eight group flags) of the error locator against the literal
// symbol-to-group table of the error-location map.
module tb_dmc_error_locator;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;
  syn_flags_t fl;
  logic [7:0] sym;
  int checks = 0, failures = 0;

  dmc_error_locator dut (.flags(fl), .sym_err(sym));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    for (int i = 0; i < 256; i++) begin
      fl = syn_flags_t'(8'(i));
      #1;
      for (int s = 0; s < 8; s++) e[s] = fl.h_nz[ref_hg(s)] & fl.v_nz[ref_vg(s)];
      checks++;
      if (sym !== e) begin
        failures++;
        $display("FAIL h_nz=%b v_nz=%b sym=%b exp %b", fl.h_nz, fl.v_nz, sym, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
