// tb_dmc_comparator: random check of the XOR comparator: equal inputs give
// an all-zero syndrome, and a known flip pattern on H or V shows up exactly
// in H_syn or V_syn.
module tb_dmc_comparator;
  logic [19:0] hm, hg, hs;
  logic [15:0] vm, vg, vs;
  int checks = 0, failures = 0;

  dmc_comparator dut (.h_mem(hm), .v_mem(vm), .h_gen(hg), .v_gen(vg), .h_syn(hs), .v_syn(vs));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] fh;
    logic [15:0] fv;
    for (int n = 0; n < 1000; n++) begin
      hg = 20'($urandom); vg = 16'($urandom);
      fh = ((n % 2) != 0) ? 20'($urandom) : 20'(1 << (n % 20));
      fv = ((n % 3) != 0) ? 16'($urandom) : 16'h0;
      hm = hg ^ fh; vm = vg ^ fv;
      #1;
      checks++;
      if (hs !== fh || vs !== fv) begin
        failures++;
        $display("FAIL n=%0d hs=%h exp %h vs=%h exp %h", n, hs, fh, vs, fv);
      end
      hm = hg; vm = vg; #1;
      checks++;
      if (hs !== '0 || vs !== '0) begin failures++; $display("FAIL equal inputs"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
