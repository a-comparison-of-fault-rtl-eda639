// dup_edc_memory: a memory protected by duplication with an error detecting or
// correcting code, without scrubbing.
//
// Two copies of the memory are written with the same user word. The first copy
// stores the word encoded with CODE (parity, complement duplicate or SEC/DED);
// the second copy stores the plain word. On a read the first copy is decoded.
// If its decoder reports an error it cannot repair, the output multiplexer
// passes the plain copy instead; otherwise it passes the decoded (for SEC/DED,
// corrected) word. The inputs are not duplicated: a wrong address or write
// enable would be written consistently into both copies, so duplicating them
// would gain nothing.
// err is the first copy's decoder error flag, for observation.
// BRAM = 1 builds both copies from block RAM (synchronous read, dout one clock
// after addr); BRAM = 0 from LUTRAM (combinational read).
// The structure (one encoded copy, one plain copy, a selecting multiplexer,
// single inputs) follows the document; the selection rule is this design's.
module dup_edc_memory
  import ftmem_pkg::*;
#(
  parameter code_e       CODE  = CODE_PARITY,
  parameter int unsigned DEPTH = 1024,
  parameter bit          BRAM  = 1'b1,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = cw_width(CODE)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  output logic              err
);
  logic [CW-1:0]     enc_w, enc_r;
  logic [DATA_W-1:0] plain_r, dec_r;
  logic              corr;

  edc_encoder #(.CODE(CODE)) u_enc (.data(din), .cw(enc_w));

  if (BRAM) begin : g_bram
    bram_dp #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE)))) u_mem_enc (
      .clk, .a_we(we), .a_addr(addr), .a_din(enc_w), .a_dout(enc_r),
      .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout()
    );
    bram_dp #(.W(DATA_W), .DEPTH(DEPTH)) u_mem_dup (
      .clk, .a_we(we), .a_addr(addr), .a_din(din), .a_dout(plain_r),
      .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout()
    );
  end else begin : g_lut
    lutram #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE)))) u_mem_enc (
      .clk, .we, .waddr(addr), .wdata(enc_w), .raddr(addr), .rdata(enc_r)
    );
    lutram #(.W(DATA_W), .DEPTH(DEPTH)) u_mem_dup (
      .clk, .we, .waddr(addr), .wdata(din), .raddr(addr), .rdata(plain_r)
    );
  end

  edc_decoder #(.CODE(CODE)) u_dec (.cw(enc_r), .data(dec_r), .err(err), .corr(corr));

  assign dout = err ? plain_r : dec_r;
endmodule
