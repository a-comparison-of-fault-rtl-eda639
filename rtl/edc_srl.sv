// edc_srl: an SRL shift register protected by a code, with or without
// duplication (the SRL forms of Parity Dup, CD Dup, SEC/DED and SEC/DED Dup).
//
// The SRL input word is encoded with CODE and shifted through an SRL of
// code words. At the static tap the code word is decoded. With DUP = 1 a second
// SRL shifts the plain word alongside; when the decoder reports an error it
// cannot repair, the plain word is output instead of the decoded one. With
// DUP = 0 (meant for SEC/DED) the decoded, corrected word is the output.
// In non-feedback mode (fb = 0) both SRLs take din. In feedback mode (fb = 1)
// they take the output word, the encoded SRL after encoding it again, so the
// register recirculates its contents and a word that was corrected, or taken
// from the plain copy, re-enters both SRLs clean.
// err is the decoder's uncorrectable-error flag and corr its corrected-error
// flag (SEC/DED only).
// Timing: dout is combinational from the tap; the SRLs shift on clock edges
// with ce set. Stages start as the code word of zero and the plain zero word.
// The four protected SRLs, the 16 x 16 size, static addressing and the two
// modes follow the document; the selection rule and the re-encoding of the fed
// back word are this design's.
module edc_srl
  import ftmem_pkg::*;
#(
  parameter code_e       CODE  = CODE_PARITY,
  parameter bit          DUP   = 1'b1,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = cw_width(CODE)
) (
  input  logic              clk,
  input  logic              ce,
  input  logic              fb,
  input  logic [DATA_W-1:0] din,
  input  logic [AW-1:0]     addr,
  output logic [DATA_W-1:0] dout,
  output logic              err,
  output logic              corr
);
  logic [DATA_W-1:0] sin, dec;
  logic [CW-1:0]     enc_in, enc_q;

  assign sin = fb ? dout : din;

  edc_encoder #(.CODE(CODE)) u_enc (.data(sin), .cw(enc_in));

  srl #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE)))) u_enc_srl (
    .clk, .ce, .din(enc_in), .addr, .dout(enc_q)
  );

  edc_decoder #(.CODE(CODE)) u_dec (.cw(enc_q), .data(dec), .err(err), .corr(corr));

  if (DUP) begin : g_dup
    logic [DATA_W-1:0] plain_q;
    srl #(.W(DATA_W), .DEPTH(DEPTH)) u_plain_srl (
      .clk, .ce, .din(sin), .addr, .dout(plain_q)
    );
    assign dout = err ? plain_q : dec;
  end else begin : g_single
    assign dout = dec;
  end
endmodule
