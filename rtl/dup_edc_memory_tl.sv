// dup_edc_memory_tl: a memory protected by duplication with an error detecting
// or correcting code, without scrubbing, with triplicated logic.
//
// The same scheme as dup_edc_memory (one copy stores the word encoded with
// CODE, one copy the plain word; the decoder's error flag selects the plain
// copy), with the encoder, decoder and selection multiplexer triplicated into
// three redundancy domains d = 0..2. The two memories and the inputs stay
// single. The encoded copy's write data is the vote of the three domains'
// encoders, so an upset encoder in one domain is out-voted; the plain copy
// takes din directly. Each domain decodes the encoded copy on its own and
// drives its own output dout[d] and error flag err[d], so the outputs can feed
// a triplicated design and be voted there.
// BRAM = 1 builds both copies from block RAM (synchronous read, dout one clock
// after addr); BRAM = 0 from LUTRAM (combinational read).
// Triplicating the encoder, decoder and selection logic and outputs, while the
// inputs stay single, follows the document; the write-data voter is this
// design's.
module dup_edc_memory_tl
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
  output logic [DATA_W-1:0] dout [3],
  output logic              err  [3]
);
  logic [CW-1:0]     enc_w [3];
  logic [CW-1:0]     wd, enc_r;
  logic [DATA_W-1:0] plain_r;

  for (genvar d = 0; d < 3; d++) begin : g_enc
    edc_encoder #(.CODE(CODE)) u_enc (.data(din), .cw(enc_w[d]));
  end

  tmr_voter #(.W(CW)) u_wd_vote (
    .a(enc_w[0]), .b(enc_w[1]), .c(enc_w[2]), .y(wd), .mismatch()
  );

  if (BRAM) begin : g_bram
    bram_dp #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE)))) u_mem_enc (
      .clk, .a_we(we), .a_addr(addr), .a_din(wd), .a_dout(enc_r),
      .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout()
    );
    bram_dp #(.W(DATA_W), .DEPTH(DEPTH)) u_mem_dup (
      .clk, .a_we(we), .a_addr(addr), .a_din(din), .a_dout(plain_r),
      .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout()
    );
  end else begin : g_lut
    lutram #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE)))) u_mem_enc (
      .clk, .we, .waddr(addr), .wdata(wd), .raddr(addr), .rdata(enc_r)
    );
    lutram #(.W(DATA_W), .DEPTH(DEPTH)) u_mem_dup (
      .clk, .we, .waddr(addr), .wdata(din), .raddr(addr), .rdata(plain_r)
    );
  end

  for (genvar d = 0; d < 3; d++) begin : g_dom
    logic [DATA_W-1:0] dec_r;
    logic              corr;

    edc_decoder #(.CODE(CODE)) u_dec (.cw(enc_r), .data(dec_r), .err(err[d]), .corr(corr));

    assign dout[d] = err[d] ? plain_r : dec_r;
  end
endmodule
