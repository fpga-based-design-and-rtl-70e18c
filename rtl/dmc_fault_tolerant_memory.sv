// dmc_fault_tolerant_memory: a memory protected by a 32-bit Decimal Matrix
// Code, with the encoder reused by the decoder.
//
// Write (we = 1): wdata goes through dmc_encoder, which produces the 20
// horizontal and 16 vertical redundant bits; the codeword {H, V, D} is
// written at addr. Read (re = 1, we = 0): the codeword at addr is fetched
// and the data part D' is routed to the *same* dmc_encoder, which now
// regenerates H' and V'; dmc_decoder compares them with the stored H and V,
// locates the erroneous symbols and corrects them. Sharing one encoder
// between the two paths is the encoder-reuse technique (ERT) of the design;
// a 2:1 multiplexer in front of the encoder, steered by we, selects which
// word it encodes. Hence one port: a cycle is either a write or a read, and
// a write has priority.
//
// Timing: a write takes effect at the clock edge. A read returns rdata,
// err_detected and sym_err registered, with rvalid high, one cycle after
// re. enc_h / enc_v hold the redundant bits of the last word written, for
// display. upset / upset_addr / upset_mask flip stored codeword bits to
// model SEU/MCU strikes. rst_n is a synchronous active-low reset of the
// output registers only. The data path and ERT follow the design; the
// port list, the one-cycle read latency, the priority rule, the reset and
// the depth (16 words) are this implementation's choices.
module dmc_fault_tolerant_memory
  import dmc_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic               re,
  input  logic [AW-1:0]      addr,
  input  data_t              wdata,
  input  logic               upset,
  input  logic [AW-1:0]      upset_addr,
  input  logic [CW_W-1:0]    upset_mask,
  output logic               rvalid,
  output data_t              rdata,
  output logic               err_detected,
  output logic [NUM_SYM-1:0] sym_err,
  output hbits_t             enc_h,
  output vbits_t             enc_v
);

  codeword_t cw_rd, cw_wr;
  data_t     enc_in;
  hbits_t    h_enc;
  vbits_t    v_enc;
  data_t     d_corr;
  logic      err_c;
  logic [NUM_SYM-1:0] sym_err_c;
  hbits_t    h_syn_unused;
  vbits_t    v_syn_unused;

  // Encoder reuse: encode the write data on a write, the fetched data
  // otherwise.
  always_comb enc_in = we ? wdata : cw_rd.d;

  dmc_encoder u_enc (
    .d(enc_in),
    .h(h_enc),
    .v(v_enc)
  );

  always_comb cw_wr = '{h: h_enc, v: v_enc, d: wdata};

  dmc_codeword_memory #(.DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk       (clk),
    .we        (we),
    .waddr     (addr),
    .wdata     (cw_wr),
    .raddr     (addr),
    .rdata     (cw_rd),
    .upset     (upset),
    .upset_addr(upset_addr),
    .upset_mask(upset_mask)
  );

  dmc_decoder u_dec (
    .cw_mem      (cw_rd),
    .h_gen       (h_enc),
    .v_gen       (v_enc),
    .d_out       (d_corr),
    .err_detected(err_c),
    .sym_err     (sym_err_c),
    .h_syn       (h_syn_unused),
    .v_syn       (v_syn_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rvalid       <= 1'b0;
      rdata        <= '0;
      err_detected <= 1'b0;
      sym_err      <= '0;
      enc_h        <= '0;
      enc_v        <= '0;
    end else begin
      rvalid <= re && !we;
      if (re && !we) begin
        rdata        <= d_corr;
        err_detected <= err_c;
        sym_err      <= sym_err_c;
      end
      if (we) begin
        enc_h <= h_enc;
        enc_v <= v_enc;
      end
    end
  end

endmodule
