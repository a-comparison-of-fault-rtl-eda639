// ecc_lutram_scrubber_tl: a LUTRAM protected by a SEC/DED code, with scrubbing
// on read and triplicated logic.
//
// The same scheme as ecc_lutram_scrubber (one LUTRAM of 22-bit SEC/DED code
// words; a word whose single error was corrected is written back, encoded
// again, in any clock without a user write; a double error is only reported),
// with all logic triplicated into three redundancy domains d = 0..2; only the
// memory is single. Each domain encodes din, decodes the word at addr and
// outputs dout[d], err[d] (double error) and corr[d] (corrected single error).
// In front of the LUTRAM's single write port sit voters: the write data is the
// vote of the three domains' encoded words (the user's on a write, the
// corrected word otherwise), and the write enable is the user write or the
// majority of the domains' corr flags.
// Timing: reads are combinational; writes and repairs happen at the clock edge.
// SEC/DED protection with non-deterministic scrubbing and triplicated logic
// follow the document; the voter placement and the write-back rule are this
// design's.
module ecc_lutram_scrubber_tl
  import ftmem_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
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
  logic [CW-1:0] rd, wd;
  logic [CW-1:0] enc_wr [3];
  logic          mwe;

  for (genvar d = 0; d < 3; d++) begin : g_dom
    logic [CW-1:0] enc_user, enc_fix;

    edc_encoder #(.CODE(CODE_SECDED)) u_enc_user (.data(din),     .cw(enc_user));
    edc_decoder #(.CODE(CODE_SECDED)) u_dec (.cw(rd), .data(dout[d]), .err(err[d]), .corr(corr[d]));
    edc_encoder #(.CODE(CODE_SECDED)) u_enc_fix  (.data(dout[d]), .cw(enc_fix));

    assign enc_wr[d] = we ? enc_user : enc_fix;
  end

  tmr_voter #(.W(CW)) u_wd_vote (
    .a(enc_wr[0]), .b(enc_wr[1]), .c(enc_wr[2]), .y(wd), .mismatch()
  );
  assign mwe = we || (corr[0] & corr[1]) || (corr[0] & corr[2]) || (corr[1] & corr[2]);

  lutram #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE_SECDED)))) u_mem (
    .clk, .we(mwe), .waddr(addr), .wdata(wd), .raddr(addr), .rdata(rd)
  );
endmodule
