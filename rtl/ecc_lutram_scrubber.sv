// ecc_lutram_scrubber: a LUTRAM protected by a SEC/DED code with scrubbing on
// read.
//
// Every user word is stored as a 22-bit SEC/DED code word in one LUTRAM. The
// word at the user's address is decoded in the same clock; dout carries the
// corrected data, corr flags a corrected single error and err a detected double
// error. In every clock without a user write, a word whose single error was
// corrected is written back, encoded again, through a multiplexer in front of
// the LUTRAM's write port, so the upset does not stay to pair with a second
// one. A double error cannot be repaired and is left in place.
// Timing: reads are combinational; writes and repairs happen at the clock edge.
// SEC/DED protection of a 16-entry LUTRAM with non-deterministic scrubbing
// follows the document; the write-back rule is this design's.
module ecc_lutram_scrubber
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
  output logic [DATA_W-1:0] dout,
  output logic              err,
  output logic              corr
);
  logic [CW-1:0] enc_user, enc_fix, rd, wd;
  logic          mwe;

  edc_encoder #(.CODE(CODE_SECDED)) u_enc_user (.data(din),  .cw(enc_user));
  edc_encoder #(.CODE(CODE_SECDED)) u_enc_fix  (.data(dout), .cw(enc_fix));

  lutram #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE_SECDED)))) u_mem (
    .clk, .we(mwe), .waddr(addr), .wdata(wd), .raddr(addr), .rdata(rd)
  );

  edc_decoder #(.CODE(CODE_SECDED)) u_dec (.cw(rd), .data(dout), .err(err), .corr(corr));

  always_comb begin
    if (we) begin
      mwe = 1'b1;
      wd  = enc_user;
    end else begin
      mwe = corr;
      wd  = enc_fix;
    end
  end
endmodule
