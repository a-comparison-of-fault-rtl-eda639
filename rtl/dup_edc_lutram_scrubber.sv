// dup_edc_lutram_scrubber: a LUTRAM protected by duplication with an error
// detecting/correcting code, with non-deterministic scrubbing.
//
// Two DEPTH-word LUTRAMs both store the user word encoded with CODE. Both are
// read at the user's address and decoded. The output multiplexer takes copy 0
// unless copy 0 reports an error it cannot repair, in which case it takes copy 1.
// The repair logic runs whenever the user does not write: a copy whose decoder
// reports an error (or, for SEC/DED, a corrected single error) is rewritten, at
// the next clock edge, with the output word encoded again, provided the other
// copy or the code could supply a good word. When both copies report an
// uncorrectable error nothing is rewritten and dbl_err is raised. A multiplexer
// in front of each copy's write port gives the user write priority over the
// repair. Each copy's write enable comes from its own logic.
// Timing: reads are combinational; writes and repairs happen at the clock edge.
// The two encoded copies, the decoders, the selection/repair logic and the
// write-port multiplexers follow the document's figure; the exact selection and
// repair rules are this design's.
module dup_edc_lutram_scrubber
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
  output logic [DATA_W-1:0] dout,
  output logic              dbl_err
);
  logic [CW-1:0]     enc_user, enc_fix;
  logic [CW-1:0]     rd   [2];
  logic [CW-1:0]     wd   [2];
  logic [DATA_W-1:0] dec  [2];
  logic              err  [2];
  logic              corr [2];
  logic              mwe  [2];

  edc_encoder #(.CODE(CODE)) u_enc_user (.data(din),  .cw(enc_user));
  edc_encoder #(.CODE(CODE)) u_enc_fix  (.data(dout), .cw(enc_fix));

  assign dout    = err[0] ? dec[1] : dec[0];
  assign dbl_err = err[0] && err[1];

  for (genvar k = 0; k < 2; k++) begin : g_copy
    lutram #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE)))) u_mem (
      .clk, .we(mwe[k]), .waddr(addr), .wdata(wd[k]), .raddr(addr), .rdata(rd[k])
    );
    edc_decoder #(.CODE(CODE)) u_dec (.cw(rd[k]), .data(dec[k]), .err(err[k]), .corr(corr[k]));

    always_comb begin
      if (we) begin
        mwe[k] = 1'b1;
        wd[k]  = enc_user;
      end else begin
        mwe[k] = (err[k] || corr[k]) && !dbl_err;
        wd[k]  = enc_fix;
      end
    end
  end
endmodule
