// ecc_memory_tl: a memory protected by a SEC/DED error correcting code alone,
// without scrubbing, with triplicated logic.
//
// The same scheme as ecc_memory (22-bit SEC/DED code words; a single wrong bit
// is corrected on the output, two wrong bits are reported), with the encoder
// and decoder triplicated into three redundancy domains d = 0..2. The memory
// and the inputs stay single. The memory's write data is the vote of the three
// domains' encoders; each domain decodes the stored word on its own and drives
// dout[d], err[d] (double error) and corr[d] (corrected single error).
// BRAM = 1 stores the code words in block RAM (synchronous read, dout one clock
// after addr); BRAM = 0 uses LUTRAM (combinational read).
// Triplicating the encoder and decoder logic and outputs, while the inputs stay
// single, follows the document; the write-data voter is this design's.
module ecc_memory_tl
  import ftmem_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter bit          BRAM  = 1'b1,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = cw_width(CODE_SECDED)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout [3],
  output logic              err  [3],
  output logic              corr [3]
);
  logic [CW-1:0] enc_w [3];
  logic [CW-1:0] wd, enc_r;

  for (genvar d = 0; d < 3; d++) begin : g_enc
    edc_encoder #(.CODE(CODE_SECDED)) u_enc (.data(din), .cw(enc_w[d]));
  end

  tmr_voter #(.W(CW)) u_wd_vote (
    .a(enc_w[0]), .b(enc_w[1]), .c(enc_w[2]), .y(wd), .mismatch()
  );

  if (BRAM) begin : g_bram
    bram_dp #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE_SECDED)))) u_mem (
      .clk, .a_we(we), .a_addr(addr), .a_din(wd), .a_dout(enc_r),
      .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout()
    );
  end else begin : g_lut
    lutram #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE_SECDED)))) u_mem (
      .clk, .we, .waddr(addr), .wdata(wd), .raddr(addr), .rdata(enc_r)
    );
  end

  for (genvar d = 0; d < 3; d++) begin : g_dom
    edc_decoder #(.CODE(CODE_SECDED)) u_dec (.cw(enc_r), .data(dout[d]), .err(err[d]), .corr(corr[d]));
  end
endmodule
