// ftmem_top: the fault-tolerant memory designs side by side.
//
// Each protected memory has its own ports; they share only the clock and reset.
//   bram_scrub_*  1024 x 16 BRAM, TMR with triplicated voters and deterministic
//                 scrubbing (tmr_bram_scrubber); the recommended BRAM design.
//   lut_scrub_*   16 x 16 LUTRAM, TMR with triplicated voters and scrubbing on
//                 read (tmr_lutram_scrubber); the recommended LUTRAM design.
//   srl_*         16 x 16 SRL, TMR with triplicated voters, feedback selectable
//                 (tmr_srl); the recommended SRL design.
//   tmr_bram_*    1024 x 16 BRAM, TMR with triplicated voters, no scrubbing.
//   dup_*[c]      1024 x 16 BRAM, duplication with code c (0 parity, 1 CD,
//                 2 SEC/DED), no scrubbing (dup_edc_memory).
//   ecc_*         1024 x 16 BRAM, SEC/DED only (ecc_memory).
//   dupx_*[c]     the dup_*[c] memories again with triplicated logic, outputs
//                 [c][domain], sharing the dup_req[c] inputs
//                 (dup_edc_memory_tl).
//   eccx_*        the ecc_* memory again with triplicated logic, outputs per
//                 domain, sharing the ecc_req inputs (ecc_memory_tl).
//   dupb_*[c]     1024 x 16 BRAM, duplication with code c, triplicated logic
//                 (outputs [c][domain]) and deterministic
//                 scrubbing of the whole memory on a detected error
//                 (dup_edc_bram_scrubber).
//   eccs_*        16 x 16 LUTRAM, SEC/DED with scrubbing on read
//                 (ecc_lutram_scrubber).
//   dups_*[c]     16 x 16 LUTRAM, duplication with code c and scrubbing on read
//                 (dup_edc_lutram_scrubber).
//   dupt_*[c]     16 x 16 LUTRAM, duplication with code c, scrubbing on read and
//                 triplicated logic, outputs [c][domain]
//                 (dup_edc_lutram_scrubber_tl).
//   ecct_*        16 x 16 LUTRAM, SEC/DED with scrubbing on read and triplicated
//                 logic, outputs per domain (ecc_lutram_scrubber_tl).
//   esrl_*[v]     16 x 16 SRL protected by a code (edc_srl), sharing one set of
//                 inputs: v = 0 parity + duplication, 1 CD + duplication,
//                 2 SEC/DED, 3 SEC/DED + duplication.
//   esrlx_*[v]    the esrl_*[v] SRLs again with triplicated logic, outputs
//                 [v][domain], sharing the esrl inputs (edc_srl_tl).
// Timing is that of each design: BRAM reads return one clock after the
// address, LUTRAM and SRL reads in the same clock. Requests are structs of
// write enable, address and data (ftmem_pkg).
// The set of designs follows the document's comparison; bringing them together
// in one top with separate ports is this design's arrangement.
module ftmem_top
  import ftmem_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,

  input  bram_req_t         bram_scrub_req,
  output logic [DATA_W-1:0] bram_scrub_dout [3],

  input  lut_req_t          lut_scrub_req,
  output logic [DATA_W-1:0] lut_scrub_dout [3],

  input  logic              srl_ce,
  input  logic              srl_fb,
  input  logic [DATA_W-1:0] srl_din,
  input  logic [3:0]        srl_addr,
  output logic [DATA_W-1:0] srl_dout [3],

  input  bram_req_t         tmr_bram_req,
  output logic [DATA_W-1:0] tmr_bram_dout [3],

  input  bram_req_t         dup_req [3],
  output logic [DATA_W-1:0] dup_dout [3],
  output logic              dup_err [3],

  input  bram_req_t         ecc_req,
  output logic [DATA_W-1:0] ecc_dout,
  output logic              ecc_err,
  output logic              ecc_corr,

  output logic [DATA_W-1:0] dupx_dout [3][3],
  output logic              dupx_err  [3][3],
  output logic [DATA_W-1:0] eccx_dout [3],
  output logic              eccx_err  [3],
  output logic              eccx_corr [3],

  input  lut_req_t          dups_req [3],
  output logic [DATA_W-1:0] dups_dout [3],
  output logic              dups_dbl_err [3],

  input  lut_req_t          ecct_req,
  output logic [DATA_W-1:0] ecct_dout [3],
  output logic              ecct_err  [3],
  output logic              ecct_corr [3],

  input  lut_req_t          dupt_req [3],
  output logic [DATA_W-1:0] dupt_dout    [3][3],
  output logic              dupt_dbl_err [3][3],

  input  bram_req_t         dupb_req [3],
  output logic [DATA_W-1:0] dupb_dout [3][3],
  output logic              dupb_err  [3][3],

  input  lut_req_t          eccs_req,
  output logic [DATA_W-1:0] eccs_dout,
  output logic              eccs_err,
  output logic              eccs_corr,

  input  logic              esrl_ce,
  input  logic              esrl_fb,
  input  logic [DATA_W-1:0] esrl_din,
  input  logic [3:0]        esrl_addr,
  output logic [DATA_W-1:0] esrl_dout [4],
  output logic              esrl_err [4],
  output logic              esrl_corr [4],
  output logic [DATA_W-1:0] esrlx_dout [4][3],
  output logic              esrlx_err  [4][3],
  output logic              esrlx_corr [4][3]
);
  localparam code_e CODES [3] = '{CODE_PARITY, CODE_CD, CODE_SECDED};
  localparam code_e SRL_CODES [4] = '{CODE_PARITY, CODE_CD, CODE_SECDED, CODE_SECDED};
  localparam bit    SRL_DUP   [4] = '{1'b1, 1'b1, 1'b0, 1'b1};

  tmr_bram_scrubber #(.W(DATA_W), .DEPTH(BRAM_DEPTH)) u_bram_scrub (
    .clk, .rst_n,
    .we(bram_scrub_req.we), .addr(bram_scrub_req.addr), .din(bram_scrub_req.data),
    .dout(bram_scrub_dout)
  );

  tmr_lutram_scrubber #(.W(DATA_W), .DEPTH(LUT_DEPTH)) u_lut_scrub (
    .clk,
    .we(lut_scrub_req.we), .addr(lut_scrub_req.addr), .din(lut_scrub_req.data),
    .dout(lut_scrub_dout)
  );

  tmr_srl #(.W(DATA_W), .DEPTH(LUT_DEPTH), .TRIPLE_VOTERS(1'b1)) u_srl (
    .clk, .ce(srl_ce), .fb(srl_fb), .din(srl_din), .addr(srl_addr), .dout(srl_dout)
  );

  tmr_memory #(.W(DATA_W), .DEPTH(BRAM_DEPTH), .BRAM(1'b1), .TRIPLE_VOTERS(1'b1)) u_tmr_bram (
    .clk,
    .we(tmr_bram_req.we), .addr(tmr_bram_req.addr), .din(tmr_bram_req.data),
    .dout(tmr_bram_dout)
  );

  for (genvar c = 0; c < 3; c++) begin : g_code
    dup_edc_memory #(.CODE(CODES[c]), .DEPTH(BRAM_DEPTH), .BRAM(1'b1)) u_dup (
      .clk,
      .we(dup_req[c].we), .addr(dup_req[c].addr), .din(dup_req[c].data),
      .dout(dup_dout[c]), .err(dup_err[c])
    );

    dup_edc_memory_tl #(.CODE(CODES[c]), .DEPTH(BRAM_DEPTH), .BRAM(1'b1)) u_dupx (
      .clk,
      .we(dup_req[c].we), .addr(dup_req[c].addr), .din(dup_req[c].data),
      .dout(dupx_dout[c]), .err(dupx_err[c])
    );

    dup_edc_lutram_scrubber #(.CODE(CODES[c]), .DEPTH(LUT_DEPTH)) u_dups (
      .clk,
      .we(dups_req[c].we), .addr(dups_req[c].addr), .din(dups_req[c].data),
      .dout(dups_dout[c]), .dbl_err(dups_dbl_err[c])
    );

    dup_edc_lutram_scrubber_tl #(.CODE(CODES[c]), .DEPTH(LUT_DEPTH)) u_dupt (
      .clk,
      .we(dupt_req[c].we), .addr(dupt_req[c].addr), .din(dupt_req[c].data),
      .dout(dupt_dout[c]), .dbl_err(dupt_dbl_err[c])
    );

    dup_edc_bram_scrubber #(.CODE(CODES[c]), .DEPTH(BRAM_DEPTH)) u_dupb (
      .clk, .rst_n,
      .we(dupb_req[c].we), .addr(dupb_req[c].addr), .din(dupb_req[c].data),
      .dout(dupb_dout[c]), .err(dupb_err[c])
    );
  end

  for (genvar v = 0; v < 4; v++) begin : g_esrl
    edc_srl #(.CODE(SRL_CODES[v]), .DUP(SRL_DUP[v]), .DEPTH(LUT_DEPTH)) u_esrl (
      .clk, .ce(esrl_ce), .fb(esrl_fb), .din(esrl_din), .addr(esrl_addr),
      .dout(esrl_dout[v]), .err(esrl_err[v]), .corr(esrl_corr[v])
    );

    edc_srl_tl #(.CODE(SRL_CODES[v]), .DUP(SRL_DUP[v]), .DEPTH(LUT_DEPTH)) u_esrlx (
      .clk, .ce(esrl_ce), .fb(esrl_fb), .din(esrl_din), .addr(esrl_addr),
      .dout(esrlx_dout[v]), .err(esrlx_err[v]), .corr(esrlx_corr[v])
    );
  end

  ecc_lutram_scrubber_tl #(.DEPTH(LUT_DEPTH)) u_ecct (
    .clk,
    .we(ecct_req.we), .addr(ecct_req.addr), .din(ecct_req.data),
    .dout(ecct_dout), .err(ecct_err), .corr(ecct_corr)
  );

  ecc_lutram_scrubber #(.DEPTH(LUT_DEPTH)) u_eccs (
    .clk,
    .we(eccs_req.we), .addr(eccs_req.addr), .din(eccs_req.data),
    .dout(eccs_dout), .err(eccs_err), .corr(eccs_corr)
  );

  ecc_memory_tl #(.DEPTH(BRAM_DEPTH), .BRAM(1'b1)) u_eccx (
    .clk,
    .we(ecc_req.we), .addr(ecc_req.addr), .din(ecc_req.data),
    .dout(eccx_dout), .err(eccx_err), .corr(eccx_corr)
  );

  ecc_memory #(.DEPTH(BRAM_DEPTH), .BRAM(1'b1)) u_ecc (
    .clk,
    .we(ecc_req.we), .addr(ecc_req.addr), .din(ecc_req.data),
    .dout(ecc_dout), .err(ecc_err), .corr(ecc_corr)
  );
endmodule
