// dmc_codeword_memory: the memory array that holds DMC codewords.
//
// Each word is one 68-bit codeword {H, V, D}. Writes are synchronous; the
// read is asynchronous (distributed-RAM style) so that the fetched word can
// be decoded in the same cycle. A separate upset port flips the stored bits
// selected by upset_mask at upset_addr on a clock edge: it models a single
// event upset or a multiple cell upset striking the array, which is what the
// code protects against. If a write and an upset hit the same word in the
// same cycle, the write wins. The design only says that the codeword is
// stored in memory; depth, port style and the upset port are this
// implementation's choices. The array has no reset, like a RAM.
//
// Interface: we/waddr/wdata write port; raddr/rdata read port;
// upset/upset_addr/upset_mask fault injection.
module dmc_codeword_memory
  import dmc_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  codeword_t       wdata,
  input  logic [AW-1:0]   raddr,
  output codeword_t       rdata,
  input  logic            upset,
  input  logic [AW-1:0]   upset_addr,
  input  logic [CW_W-1:0] upset_mask
);

  codeword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (upset && !(we && waddr == upset_addr))
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    if (we)
      mem[waddr] <= wdata;
  end

  always_comb rdata = mem[raddr];

endmodule
