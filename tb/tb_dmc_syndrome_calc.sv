// tb_dmc_syndrome_calc: checks the grouping of the syndromes into four
// 5-bit horizontal and four 4-bit vertical groups. Every single syndrome
// bit is set alone (it must raise exactly its own group flag), then random
// sparse syndromes are compared with a group-by-group reference.
module tb_dmc_syndrome_calc;
  import dmc_pkg::*;
  logic [19:0] hs;
  logic [15:0] vs;
  syn_flags_t  fl;
  logic        err;
  int checks = 0, failures = 0;

  dmc_syndrome_calc dut (.h_syn(hs), .v_syn(vs), .flags(fl), .err_detected(err));

  task automatic check_now();
    logic [3:0] eh, ev;
    eh = {hs[19:15] != 0, hs[14:10] != 0, hs[9:5] != 0, hs[4:0] != 0};
    ev = {vs[15:12] != 0, vs[11:8] != 0, vs[7:4] != 0, vs[3:0] != 0};
    checks++;
    if (fl.h_nz !== eh || fl.v_nz !== ev || err !== (hs != 0 || vs != 0)) begin
      failures++;
      $display("FAIL hs=%h vs=%h h_nz=%b exp %b v_nz=%b exp %b err=%b", hs, vs, fl.h_nz, eh,
               fl.v_nz, ev, err);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hs = '0; vs = '0; #1; check_now();
    for (int i = 0; i < 20; i++) begin hs = 20'(1 << i); vs = '0; #1; check_now(); end
    for (int i = 0; i < 16; i++) begin vs = 16'(1 << i); hs = '0; #1; check_now(); end
    for (int n = 0; n < 1000; n++) begin
      hs = 20'($urandom & $urandom & $urandom);
      vs = 16'($urandom & $urandom & $urandom);
      #1; check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
