// tb_dmc_fault_tolerant_memory: end-to-end test of the DMC-protected memory
// at its default size (16 words). It writes words (encode mode), strikes
// stored codewords with upsets, reads them back (decode mode, same shared
// encoder) and compares rdata / err_detected / sym_err with a reference
// decoder applied to the reference codeword with the same bits flipped. It
// also checks the one-cycle read latency (rvalid), the redundant bits of the
// worked examples F5AFF6AC (H = CD332, V = 0303) and CA35566A (H groups
// 10000/01011/01111/01111, V = 9C5F, then hit by a two-bit upset) and that a write has
// priority over a read in the same cycle. Errors confined to the H bits or
// to the V bits must leave the data untouched. Each mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_dmc_fault_tolerant_memory;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW = 4;

  logic clk = 0, rst_n = 0;
  logic we, re, upset;
  logic [AW-1:0] addr, uaddr;
  data_t wdata, rdata;
  logic [CW_W-1:0] umask;
  logic rvalid, err;
  logic [7:0] sym;
  hbits_t enc_h;
  vbits_t enc_v;

  dmc_fault_tolerant_memory dut (
    .clk(clk), .rst_n(rst_n), .we(we), .re(re), .addr(addr), .wdata(wdata),
    .upset(upset), .upset_addr(uaddr), .upset_mask(umask),
    .rvalid(rvalid), .rdata(rdata), .err_detected(err), .sym_err(sym),
    .enc_h(enc_h), .enc_v(enc_v));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_encode = 0, n_decode = 0, n_clean = 0, n_detect = 0, n_corr_single = 0;
  int n_corr_burst = 0, n_corr_multi = 0, n_red_only = 0, n_priority = 0;

  logic [31:0] orig [DEPTH];
  logic [67:0] flips [DEPTH];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic do_write(input logic [AW-1:0] a, input logic [31:0] d);
    ref_chk_t c;
    @(negedge clk);
    we = 1; re = 0; addr = a; wdata = d;
    @(negedge clk);
    we = 0;
    c = ref_encode(d);
    check(enc_h == c.h && enc_v == c.v, $sformatf("encode %h: h=%h v=%h", d, enc_h, enc_v));
    orig[a] = d; flips[a] = '0;
    n_encode++;
  endtask

  task automatic do_upset(input logic [AW-1:0] a, input logic [67:0] m);
    @(negedge clk);
    upset = 1; uaddr = a; umask = m;
    @(negedge clk);
    upset = 0;
    flips[a] ^= m;
  endtask

  // Read and compare; returns nothing, classifies the case.
  task automatic do_read(input logic [AW-1:0] a);
    ref_chk_t c;
    ref_dec_t r;
    logic [67:0] stored;
    int nsym;
    @(negedge clk);
    we = 0; re = 1; addr = a;
    @(negedge clk);
    re = 0;
    check(rvalid === 1'b1, "rvalid one cycle after re");
    c = ref_encode(orig[a]);
    stored = {c.h, c.v, orig[a]} ^ flips[a];
    r = ref_decode(stored[31:0], stored[67:48], stored[47:32]);
    check(rdata == r.d && err == r.err && sym == r.sym,
          $sformatf("read addr %0d: rdata=%h exp %h err=%b exp %b sym=%b exp %b", a, rdata,
                    r.d, err, r.err, sym, r.sym));
    n_decode++;
    nsym = $countones(sym);
    if (flips[a] == 0) begin
      n_clean++;
      check(rdata == orig[a] && !err, "clean read");
    end else begin
      if (err) n_detect++;
      if (flips[a][31:0] == 0 && (flips[a][67:48] == 0 || flips[a][47:32] == 0)) begin
        // errors confined to H or to V alone never reach the data
        n_red_only++;
        check(rdata == orig[a], "redundancy-only error leaves data intact");
      end else if (rdata == orig[a]) begin
        if ($countones(flips[a]) == 1) n_corr_single++;
        else if (nsym == 1) n_corr_burst++;
        else if (nsym > 1) n_corr_multi++;
      end
    end
    @(negedge clk);
    check(rvalid === 1'b0, "rvalid drops after one cycle");
  endtask

  initial begin
    we = 0; re = 0; upset = 0; addr = '0; uaddr = '0; umask = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // worked example
    do_write(0, 32'hF5AFF6AC);
    check(enc_h == 20'hCD332 && enc_v == 16'h0303, "example H=CD332 V=0303");
    do_read(0);
    // worked example of the 2 x 4 symbol matrix: rows 566A / CA35
    do_write(1, 32'hCA35566A);
    check(enc_h == {5'b01111, 5'b01111, 5'b01011, 5'b10000} && enc_v == 16'h9C5F,
          "example H groups 10000/01011/01111/01111, V=9C5F");
    do_upset(1, 68'h6 << 8);   // two-bit upset inside symbol 2
    do_read(1);
    check(rdata == 32'hCA35566A, "example corrected");

    for (int a = 0; a < DEPTH; a++) do_write(AW'(a), $urandom);
    for (int a = 0; a < DEPTH; a++) do_read(AW'(a));

    for (int n = 0; n < 600; n++) begin
      logic [AW-1:0] a;
      logic [67:0] m;
      int kind;
      a = AW'($urandom);
      do_write(a, $urandom);
      kind = n % 6;
      case (kind)
        0: m = 68'(1) << ($urandom % 68);                        // single bit
        1: m = 68'($urandom_range(15, 1)) << (4 * ($urandom % 8)); // burst in a symbol
        2: begin                                                 // two symbols, different row/col/group
          int s0, s1;
          s0 = $urandom % 4; s1 = 4 + ((s0 + 1 + 2 * ($urandom % 2)) % 4);
          if ((s1 % 2) == (s0 % 2)) s1 = 4 + ((s0 + 1) % 4);
          m = (68'($urandom_range(15, 1)) << (4 * s0)) | (68'($urandom_range(15, 1)) << (4 * s1));
        end
        3: m = (($urandom % 2) != 0) ? 68'(20'($urandom & $urandom)) << 48    // H bits only
                              : 68'(16'($urandom & $urandom)) << 32;   // V bits only
        4: m = {4'($urandom), $urandom & $urandom, $urandom & $urandom & $urandom};
        default: m = '0;
      endcase
      if (m != 0) do_upset(a, m);
      do_read(a);
    end

    // write has priority over a simultaneous read
    for (int n = 0; n < 8; n++) begin
      logic [31:0] d;
      d = $urandom;
      @(negedge clk);
      we = 1; re = 1; addr = AW'(n); wdata = d;
      @(negedge clk);
      we = 0; re = 0;
      check(rvalid === 1'b0, "no read result when write wins");
      orig[n] = d; flips[n] = '0;
      n_priority++;
      do_read(AW'(n));
    end

    $display("mechanisms: encode=%0d decode=%0d clean=%0d detected=%0d single_corr=%0d burst_corr=%0d multi_sym_corr=%0d redundancy_only=%0d write_priority=%0d",
             n_encode, n_decode, n_clean, n_detect, n_corr_single, n_corr_burst, n_corr_multi,
             n_red_only, n_priority);
    check(n_encode > 0, "encode happened");
    check(n_decode > 0, "decode happened");
    check(n_clean > 0, "clean read happened");
    check(n_detect > 0, "error detection happened");
    check(n_corr_single > 0, "single-bit correction happened");
    check(n_corr_burst > 0, "symbol burst correction happened");
    check(n_corr_multi > 0, "multi-symbol correction happened");
    check(n_red_only > 0, "redundancy-only error happened");
    check(n_priority > 0, "write priority happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
