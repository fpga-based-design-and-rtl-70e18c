// tb_dmc_codeword_memory: writes random codewords to every word, reads them
// back, then applies upsets (flip masks) and checks that exactly those bits
// changed, and that a write in the same cycle as an upset to the same word
// wins. One word is kept in a scoreboard per address.
module tb_dmc_codeword_memory;
  import dmc_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = 4;
  logic clk = 0;
  logic we, upset;
  logic [AW-1:0] waddr, raddr, uaddr;
  codeword_t wdata, rdata;
  logic [CW_W-1:0] umask;
  logic [CW_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  dmc_codeword_memory dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata),
    .upset(upset), .upset_addr(uaddr), .upset_mask(umask));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CW_W-1:0] rnd68();
    return {4'($urandom), $urandom, $urandom};
  endfunction

  task automatic check_all();
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d: %h exp %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    we = 0; upset = 0; waddr = '0; raddr = '0; uaddr = '0; umask = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = rnd68(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    check_all();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 0; upset = 1; uaddr = AW'($urandom); umask = rnd68() & rnd68();
      model[uaddr] = model[uaddr] ^ umask;
      if (n % 5 == 0) begin  // simultaneous write
        we = 1; waddr = (n % 10 == 0) ? uaddr : AW'(uaddr + 1); wdata = rnd68();
        if (waddr == uaddr) model[uaddr] = wdata;
        else model[waddr] = wdata;
      end
      @(negedge clk); we = 0; upset = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
