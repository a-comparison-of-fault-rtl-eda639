// ecc_memory: a memory protected by a SEC/DED error correcting code alone.
//
// Each 16-bit user word is encoded into a 22-bit SEC/DED code word before it is
// stored; on a read the code word is decoded, a single wrong bit is corrected
// (corr) and two wrong bits are reported (err). There is no second copy, so a
// double error cannot be repaired.
// BRAM = 1 stores the code words in block RAM (synchronous read, dout one clock
// after addr); a 22-bit word does not fit one 18-bit-wide BRAM and in an FPGA
// would be split over two BRAMs of 11 bits each, which is left to synthesis
// here. BRAM = 0 uses LUTRAM (combinational read).
// The (22,16) SEC/DED code and the encoder/memory/decoder chain follow the
// document; the choice of an extended Hamming code is this design's.
module ecc_memory
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
  output logic [DATA_W-1:0] dout,
  output logic              err,
  output logic              corr
);
  logic [CW-1:0] enc_w, enc_r;

  edc_encoder #(.CODE(CODE_SECDED)) u_enc (.data(din), .cw(enc_w));

  if (BRAM) begin : g_bram
    bram_dp #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE_SECDED)))) u_mem (
      .clk, .a_we(we), .a_addr(addr), .a_din(enc_w), .a_dout(enc_r),
      .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout()
    );
  end else begin : g_lut
    lutram #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE_SECDED)))) u_mem (
      .clk, .we, .waddr(addr), .wdata(enc_w), .raddr(addr), .rdata(enc_r)
    );
  end

  edc_decoder #(.CODE(CODE_SECDED)) u_dec (.cw(enc_r), .data(dout), .err(err), .corr(corr));
endmodule
