// dup_edc_lutram_scrubber_tl: a LUTRAM protected by duplication with an error
// detecting/correcting code, non-deterministic scrubbing and triplicated logic.
//
// The same scheme as dup_edc_lutram_scrubber (two LUTRAMs both holding the user
// word encoded with CODE, the output taken from copy 0 unless copy 0 reports an
// error it cannot repair, and a copy that reports an error rewritten with the
// output word encoded again whenever the user does not write), with all logic
// triplicated into three redundancy domains d = 0..2; only the two memories
// are single. Each domain encodes din, decodes both copies, selects its output
// dout[d], raises dbl_err[d] when both copies report an uncorrectable error and
// decides the repair of each copy. In front of each copy's single write port
// sit its own voters: the write data is the vote of the three domains' encoded
// words (the user's on a write, the repair word otherwise), and the write
// enable is the user write or the majority of the three domains' repair
// decisions for that copy.
// Timing: reads are combinational; writes and repairs happen at the clock edge.
// The duplicated encoded copies with scrubbing on read follow the document, as
// does the triplication of the logic and voters for the scrubbing designs; the
// placement of the voters at the memory inputs and the selection and repair
// rules are this design's.
module dup_edc_lutram_scrubber_tl
  import ftmem_pkg::*;
#(
  parameter code_e       CODE  = CODE_PARITY,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = cw_width(CODE)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout    [3],
  output logic              dbl_err [3]
);
  logic [CW-1:0] rd      [2];
  logic [CW-1:0] enc_wr  [3];   // per domain: the word it would write
  logic [2:0]    rep     [2];   // per copy: each domain's repair decision
  logic          mwe     [2];

  for (genvar d = 0; d < 3; d++) begin : g_dom
    logic [CW-1:0]     enc_user, enc_fix;
    logic [DATA_W-1:0] dec  [2];
    logic              err  [2];
    logic              corr [2];

    edc_encoder #(.CODE(CODE)) u_enc_user (.data(din),     .cw(enc_user));
    edc_encoder #(.CODE(CODE)) u_enc_fix  (.data(dout[d]), .cw(enc_fix));
    for (genvar k = 0; k < 2; k++) begin : g_dec
      edc_decoder #(.CODE(CODE)) u_dec (.cw(rd[k]), .data(dec[k]), .err(err[k]), .corr(corr[k]));
      assign rep[k][d] = (err[k] || corr[k]) && !dbl_err[d];
    end

    assign dout[d]    = err[0] ? dec[1] : dec[0];
    assign dbl_err[d] = err[0] && err[1];
    assign enc_wr[d]  = we ? enc_user : enc_fix;
  end

  for (genvar k = 0; k < 2; k++) begin : g_copy
    logic [CW-1:0] wd;

    tmr_voter #(.W(CW)) u_wd_vote (
      .a(enc_wr[0]), .b(enc_wr[1]), .c(enc_wr[2]), .y(wd), .mismatch()
    );
    assign mwe[k] = we || (rep[k][0] & rep[k][1]) || (rep[k][0] & rep[k][2]) || (rep[k][1] & rep[k][2]);

    lutram #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE)))) u_mem (
      .clk, .we(mwe[k]), .waddr(addr), .wdata(wd), .raddr(addr), .rdata(rd[k])
    );
  end
endmodule
