// edc_srl_tl: an SRL shift register protected by a code, with or without
// duplication, with triplicated logic.
//
// The same scheme as edc_srl (an SRL of code words decoded at a static tap;
// with DUP = 1 a plain SRL alongside whose word is output when the decoder
// reports an error it cannot repair; feedback mode fb = 1 recirculates the
// output word), with the encoder, decoder, selection multiplexer and feedback
// multiplexer triplicated into three redundancy domains d = 0..2. The SRLs and
// the inputs stay single. Each domain picks its SRL input word (din, or its own
// output dout[d] in feedback mode) and encodes it; the encoded SRL takes the
// vote of the three code words and the plain SRL the vote of the three plain
// words. Each domain decodes the tap on its own and drives dout[d], err[d]
// (uncorrectable error) and corr[d] (corrected error, SEC/DED only).
// Timing: dout is combinational from the tap; the SRLs shift on clock edges
// with ce set. Stages start as the code word of zero and the plain zero word.
// Triplicating the code logic and outputs while the inputs stay single follows
// the document; the voters in front of the SRLs, the selection rule and the
// re-encoding of the fed back word are this design's.
module edc_srl_tl
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
  output logic [DATA_W-1:0] dout [3],
  output logic              err  [3],
  output logic              corr [3]
);
  logic [DATA_W-1:0] sin [3];
  logic [CW-1:0]     enc_in [3];
  logic [CW-1:0]     enc_v, enc_q;

  for (genvar d = 0; d < 3; d++) begin : g_in
    assign sin[d] = fb ? dout[d] : din;
    edc_encoder #(.CODE(CODE)) u_enc (.data(sin[d]), .cw(enc_in[d]));
  end

  tmr_voter #(.W(CW)) u_enc_vote (
    .a(enc_in[0]), .b(enc_in[1]), .c(enc_in[2]), .y(enc_v), .mismatch()
  );

  srl #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE)))) u_enc_srl (
    .clk, .ce, .din(enc_v), .addr, .dout(enc_q)
  );

  if (DUP) begin : g_dup
    logic [DATA_W-1:0] plain_v, plain_q;

    tmr_voter #(.W(DATA_W)) u_plain_vote (
      .a(sin[0]), .b(sin[1]), .c(sin[2]), .y(plain_v), .mismatch()
    );
    srl #(.W(DATA_W), .DEPTH(DEPTH)) u_plain_srl (
      .clk, .ce, .din(plain_v), .addr, .dout(plain_q)
    );
  end

  for (genvar d = 0; d < 3; d++) begin : g_dom
    logic [DATA_W-1:0] dec;

    edc_decoder #(.CODE(CODE)) u_dec (.cw(enc_q), .data(dec), .err(err[d]), .corr(corr[d]));

    if (DUP) begin : g_sel
      assign dout[d] = err[d] ? g_dup.plain_q : dec;
    end else begin : g_single
      assign dout[d] = dec;
    end
  end
endmodule
