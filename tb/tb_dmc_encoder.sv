// tb_dmc_encoder: checks the DMC encoder on the two worked examples
// (data 0xCA35566A -> H groups 10000/01011/01111/01111, V = 0x9C5F; data
// 0xF5AFF6AC -> H = 0xCD332, V = 0x0303) and on 2000 random words against
// the equation-by-equation reference model.
module tb_dmc_encoder;
  import dmc_ref_pkg::*;
  logic [31:0] d;
  logic [19:0] h;
  logic [15:0] v;
  int checks = 0, failures = 0;

  dmc_encoder dut (.d(d), .h(h), .v(v));

  task automatic expect_hv(input logic [19:0] eh, input logic [15:0] ev);
    checks++;
    if (h !== eh || v !== ev) begin
      failures++;
      $display("FAIL d=%h h=%h (exp %h) v=%h (exp %h)", d, h, eh, v, ev);
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
    ref_chk_t r;
    d = 32'hCA35566A; #1;
    expect_hv({5'b01111, 5'b01111, 5'b01011, 5'b10000}, 16'b1001110001011111);
    d = 32'hF5AFF6AC; #1;
    expect_hv(20'hCD332, 16'h0303);
    d = 32'h0; #1;          expect_hv(20'h0, 16'h0);
    d = 32'hFFFFFFFF; #1;   expect_hv({4{5'd30}}, 16'h0);
    for (int n = 0; n < 2000; n++) begin
      d = $urandom; #1;
      r = ref_encode(d);
      expect_hv(r.h, r.v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
