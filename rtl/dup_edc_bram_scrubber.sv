// dup_edc_bram_scrubber: a BRAM protected by duplication with an error
// detecting/correcting code, with triplicated logic and deterministic
// scrubbing.
//
// Two dual-ported BRAMs both hold every user word encoded with CODE (parity,
// complement duplicate or SEC/DED). All logic around them is triplicated into
// three redundancy domains d = 0..2; only the two memories are not.
// Port A serves the user. Each domain encodes din; each copy's write data is
// its own vote of the three encoded words, so one upset encoder cannot spoil a
// copy. Each domain decodes both copies and outputs copy 0 unless it reports an
// error it cannot repair, in which case copy 1: dout[d], read data one clock
// after the address. err[d] is set when both copies report such an error.
// Port B belongs to the scrubber. A triple counter walks every address; each
// domain decodes both copies there, picks the good word by the same rule,
// encodes it again and runs its own scrub FSM (dup_scrub_fsm). When any error
// is reported the FSMs switch to full-scrub mode and write the good word back
// into both copies at every address, once round the whole memory, which also
// removes upsets the code alone cannot see in copy 1. Each copy's scrub write
// data is its own vote of the three domains' words, and its scrub write enable the
// majority of the three FSMs.
// A user write takes precedence over a scrub write to the same address.
// Duplication with both copies encoded, triplicated logic and voters, a
// triplicated counter and whole-memory scrubbing on detection follow the
// document; the selection rule, the placing of the voters in front of the
// memory inputs and the FSM are this design's.
module dup_edc_bram_scrubber
  import ftmem_pkg::*;
#(
  parameter code_e       CODE  = CODE_PARITY,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = cw_width(CODE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout [3],
  output logic              err  [3]
);
  logic [CW-1:0]     enc_user [3];
  logic [CW-1:0]     enc_fix  [3];
  logic [CW-1:0]     user_v [2];
  logic [CW-1:0]     fix_v  [2];
  logic [CW-1:0]     a_rd  [2];
  logic [CW-1:0]     b_rd  [2];
  logic [AW-1:0]     scrub_addr [3];
  logic [2:0]        fsm_we, cnt_en;
  logic              b_we  [2];

  triple_counter #(.AW(AW)) u_cnt (.clk, .rst_n, .en(cnt_en), .addr(scrub_addr));

  // each copy's data inputs are driven by its own votes of the three domains
  for (genvar k = 0; k < 2; k++) begin : g_copy
    tmr_voter #(.W(CW)) u_user_vote (
      .a(enc_user[0]), .b(enc_user[1]), .c(enc_user[2]), .y(user_v[k]), .mismatch()
    );
    tmr_voter #(.W(CW)) u_fix_vote (
      .a(enc_fix[0]), .b(enc_fix[1]), .c(enc_fix[2]), .y(fix_v[k]), .mismatch()
    );
    bram_dp #(.W(CW), .DEPTH(DEPTH), .INIT(CW'(cw_of_zero(CODE)))) u_bram (
      .clk,
      .a_we(we), .a_addr(addr), .a_din(user_v[k]), .a_dout(a_rd[k]),
      .b_we(b_we[k]), .b_addr(scrub_addr[k]), .b_din(fix_v[k]), .b_dout(b_rd[k])
    );
    assign b_we[k] = (fsm_we[0] & fsm_we[1]) | (fsm_we[0] & fsm_we[2]) | (fsm_we[1] & fsm_we[2]);
  end

  for (genvar d = 0; d < 3; d++) begin : g_dom
    logic [DATA_W-1:0] a_dec [2];
    logic [DATA_W-1:0] b_dec [2];
    logic              a_err [2];
    logic              b_err [2];
    logic              b_corr [2];
    logic [DATA_W-1:0] b_good;
    logic              err_any, dbl;

    edc_encoder #(.CODE(CODE)) u_enc_user (.data(din), .cw(enc_user[d]));
    for (genvar k = 0; k < 2; k++) begin : g_dec
      edc_decoder #(.CODE(CODE)) u_dec_a (.cw(a_rd[k]), .data(a_dec[k]), .err(a_err[k]), .corr());
      edc_decoder #(.CODE(CODE)) u_dec_b (.cw(b_rd[k]), .data(b_dec[k]), .err(b_err[k]), .corr(b_corr[k]));
    end

    assign dout[d] = a_err[0] ? a_dec[1] : a_dec[0];
    assign err[d]  = a_err[0] && a_err[1];
    assign b_good  = b_err[0] ? b_dec[1] : b_dec[0];
    assign err_any = b_err[0] || b_err[1] || b_corr[0] || b_corr[1];
    assign dbl     = b_err[0] && b_err[1];

    edc_encoder #(.CODE(CODE)) u_enc_fix (.data(b_good), .cw(enc_fix[d]));

    dup_scrub_fsm #(.AW(AW)) u_fsm (
      .clk, .rst_n, .err_any, .dbl, .scrub_addr(scrub_addr[d]),
      .user_we(we), .user_addr(addr), .we(fsm_we[d]), .en(cnt_en[d]), .full()
    );
  end
endmodule
