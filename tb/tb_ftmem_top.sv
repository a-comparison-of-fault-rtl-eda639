// tb_ftmem_top: end-to-end test of all protected memories at their full sizes.
//
// All block-RAM designs are filled with the same 1024 random words and all
// LUTRAM designs with the same 16. Single-event upsets are then injected into
// stored words of every design, and user traffic (reads and writes) runs
// against a reference model. Every output must equal the model. The test counts
// each protection mechanism and fails if one never acted:
//   voter masking (TMR), scrub write-back and user-write precedence (BRAM
//   scrubber), repair on read (LUTRAM scrubbers), feedback and non-feedback
//   shifting (SRL), switch to the duplicate (duplication with each code),
//   single-error correction and double-error detection (SEC/DED).
// Also counted: whole-memory scrubbing (duplicated BRAM scrubbers) and repair
// on read (SEC/DED LUTRAM scrubber), and for the code-protected SRLs (driven
// with the TMR SRL's inputs) the switch to the plain copy and SEC/DED
// correction at the tap, and repair on read in the LUTRAM scrubbers with
// triplicated logic, and the switch to the duplicate and SEC/DED correction in
// the triplicated-logic BRAMs and SRLs without scrubbing. At the end the scrubbed BRAMs must hold no
// upset word while the unscrubbed TMR BRAM still does.
module tb_ftmem_top;
  import ftmem_pkg::*;
  localparam int unsigned BD = BRAM_DEPTH, LD = LUT_DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  bram_req_t bram_scrub_req, tmr_bram_req, ecc_req;
  bram_req_t dup_req [3];
  lut_req_t  lut_scrub_req;
  lut_req_t  dups_req [3];
  logic srl_ce = 0, srl_fb = 0;
  logic [15:0] srl_din = 0;
  logic [3:0]  srl_addr = 4'd15;
  logic [15:0] bram_scrub_dout [3], lut_scrub_dout [3], srl_dout [3], tmr_bram_dout [3];
  logic [15:0] dup_dout [3], dups_dout [3], ecc_dout;
  logic dup_err [3], dups_dbl_err [3], ecc_err, ecc_corr;
  bram_req_t dupb_req [3];
  lut_req_t  eccs_req;
  logic [15:0] dupb_dout [3][3], eccs_dout;  // dupb: [code][domain]
  logic dupb_err [3][3], eccs_err, eccs_corr;

  ftmem_top dut (.*);

  logic [15:0] bmodel [BD];
  logic [15:0] lmodel [LD];
  logic [15:0] smodel [LD];
  int checks = 0, failures = 0;
  int n_mask = 0, n_scrub = 0, n_prec = 0, n_lrep = 0, n_fb = 0, n_nfb = 0;
  int n_sw [3] = '{0, 0, 0};
  int n_drep [3] = '{0, 0, 0};
  int n_corr = 0, n_ded = 0, n_erep = 0;
  int n_full [3] = '{0, 0, 0};
  int n_esw = 0, n_ecorr = 0, n_trep = 0;
  lut_req_t    dupt_req [3];
  lut_req_t    ecct_req;
  logic [15:0] ecct_dout [3];
  logic        ecct_err [3], ecct_corr [3];
  int          n_trep_e = 0;
  logic [15:0] dupt_dout [3][3];  // [code][domain]
  logic        dupt_dbl_err [3][3];
  logic [15:0] dupx_dout [3][3], eccx_dout [3];  // dupx: [code][domain]
  logic        dupx_err [3][3], eccx_err [3], eccx_corr [3];
  int          n_swx = 0, n_corrx = 0;
  logic esrl_ce, esrl_fb;
  logic [15:0] esrl_din;
  logic [3:0]  esrl_addr;
  logic [15:0] esrl_dout [4];
  logic esrl_err [4], esrl_corr [4];
  logic [15:0] esrlx_dout [4][3];  // [variant][domain]
  logic esrlx_err [4][3], esrlx_corr [4][3];
  int n_eswx = 0;
  assign esrl_ce = srl_ce;
  assign esrl_fb = srl_fb;
  assign esrl_din = srl_din;
  assign esrl_addr = srl_addr;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, from the design's internal enables
  always @(posedge clk) begin
    if (dut.u_bram_scrub.scrub_we != 3'b000) n_scrub++;
    if (dut.u_bram_scrub.g_dom[0].u_fsm.collide) n_prec++;
    if (!lut_scrub_req.we && (dut.u_lut_scrub.mem_we[0] || dut.u_lut_scrub.mem_we[1] || dut.u_lut_scrub.mem_we[2])) n_lrep++;
    if (srl_ce && srl_fb) n_fb++;
    if (srl_ce && !srl_fb) n_nfb++;
    if (!dups_req[0].we && (dut.g_code[0].u_dups.mwe[0] || dut.g_code[0].u_dups.mwe[1])) n_drep[0]++;
    if (!dups_req[1].we && (dut.g_code[1].u_dups.mwe[0] || dut.g_code[1].u_dups.mwe[1])) n_drep[1]++;
    if (!dups_req[2].we && (dut.g_code[2].u_dups.mwe[0] || dut.g_code[2].u_dups.mwe[1])) n_drep[2]++;
    if (dut.g_code[0].u_dupb.g_dom[0].u_fsm.full && dut.g_code[0].u_dupb.b_we[0]) n_full[0]++;
    if (dut.g_code[1].u_dupb.g_dom[0].u_fsm.full && dut.g_code[1].u_dupb.b_we[0]) n_full[1]++;
    if (dut.g_code[2].u_dupb.g_dom[0].u_fsm.full && dut.g_code[2].u_dupb.b_we[0]) n_full[2]++;
    if (!eccs_req.we && dut.u_eccs.mwe) n_erep++;
    if (!ecct_req.we && dut.u_ecct.mwe) n_trep_e++;
    if (!dupt_req[0].we && (dut.g_code[0].u_dupt.mwe[0] || dut.g_code[0].u_dupt.mwe[1])) n_trep++;
    if (!dupt_req[1].we && (dut.g_code[1].u_dupt.mwe[0] || dut.g_code[1].u_dupt.mwe[1])) n_trep++;
    if (!dupt_req[2].we && (dut.g_code[2].u_dupt.mwe[0] || dut.g_code[2].u_dupt.mwe[1])) n_trep++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // Drive the same request to every block-RAM design.
  task automatic bram_all(input logic we, input int a, input logic [15:0] d);
    bram_req_t r;
    r.we = we; r.addr = 10'(a); r.data = d;
    bram_scrub_req = r; tmr_bram_req = r; ecc_req = r;
    for (int c = 0; c < 3; c++) begin dup_req[c] = r; dupb_req[c] = r; end
    if (we) bmodel[a] = d;
  endtask

  task automatic lut_all(input logic we, input int a, input logic [15:0] d);
    lut_req_t r;
    r.we = we; r.addr = 4'(a); r.data = d;
    lut_scrub_req = r;
    for (int c = 0; c < 3; c++) dups_req[c] = r;
    for (int c = 0; c < 3; c++) dupt_req[c] = r;
    ecct_req = r;
    eccs_req = r;
    if (we) lmodel[a] = d;
  endtask

  // One upset per design at BRAM address a (copy/bit chosen by k).
  task automatic upset_bram(input int a, input int k);
    logic [15:0] m;
    m = 16'd1 << (k % 16);
    case (k % 3)
      0: begin dut.u_bram_scrub.g_dom[0].u_bram.mem[a] ^= m; dut.u_tmr_bram.g_dom[0].g_bram.u_mem.mem[a] ^= m; end
      1: begin dut.u_bram_scrub.g_dom[1].u_bram.mem[a] ^= m; dut.u_tmr_bram.g_dom[1].g_bram.u_mem.mem[a] ^= m; end
      default: begin dut.u_bram_scrub.g_dom[2].u_bram.mem[a] ^= m; dut.u_tmr_bram.g_dom[2].g_bram.u_mem.mem[a] ^= m; end
    endcase
    dut.g_code[0].u_dup.g_bram.u_mem_enc.mem[a] ^= 18'd1 << (k % 18);
    dut.g_code[1].u_dup.g_bram.u_mem_enc.mem[a] ^= 32'd1 << (k % 32);
    // SEC/DED: a single error, and a double error on every fourth
    dut.g_code[2].u_dup.g_bram.u_mem_enc.mem[a] ^= (22'd1 << (k % 22)) | ((k % 4 == 0) ? 22'd1 << ((k + 7) % 22) : 22'd0);
    dut.u_ecc.g_bram.u_mem.mem[a] ^= (22'd1 << (k % 22)) | ((k % 4 == 0) ? 22'd1 << ((k + 7) % 22) : 22'd0);
    // the triplicated-logic copies get the same upsets
    dut.g_code[0].u_dupx.g_bram.u_mem_enc.mem[a] ^= 18'd1 << (k % 18);
    dut.g_code[1].u_dupx.g_bram.u_mem_enc.mem[a] ^= 32'd1 << (k % 32);
    dut.g_code[2].u_dupx.g_bram.u_mem_enc.mem[a] ^= (22'd1 << (k % 22)) | ((k % 4 == 0) ? 22'd1 << ((k + 7) % 22) : 22'd0);
    dut.u_eccx.g_bram.u_mem.mem[a] ^= (22'd1 << (k % 22)) | ((k % 4 == 0) ? 22'd1 << ((k + 7) % 22) : 22'd0);
    if (k % 2 == 0) begin
      dut.g_code[0].u_dupb.g_copy[0].u_bram.mem[a] ^= 18'd1 << (k % 18);
      dut.g_code[1].u_dupb.g_copy[0].u_bram.mem[a] ^= 32'd1 << (k % 32);
      dut.g_code[2].u_dupb.g_copy[0].u_bram.mem[a] ^= 22'd1 << (k % 22);
    end else begin
      dut.g_code[0].u_dupb.g_copy[1].u_bram.mem[a] ^= 18'd1 << (k % 18);
      dut.g_code[1].u_dupb.g_copy[1].u_bram.mem[a] ^= 32'd1 << (k % 32);
      dut.g_code[2].u_dupb.g_copy[1].u_bram.mem[a] ^= 22'd1 << (k % 22);
    end
  endtask

  task automatic upset_lut(input int a, input int k);
    case (k % 3)
      0: dut.u_lut_scrub.g_dom[0].u_mem.mem[a] ^= 16'h0400;
      1: dut.u_lut_scrub.g_dom[1].u_mem.mem[a] ^= 16'h0400;
      default: dut.u_lut_scrub.g_dom[2].u_mem.mem[a] ^= 16'h0400;
    endcase
    if (k % 2 == 0) begin
      dut.g_code[0].u_dups.g_copy[0].u_mem.mem[a] ^= 18'd1 << (k % 18);
      dut.g_code[0].u_dupt.g_copy[0].u_mem.mem[a] ^= 18'd1 << (k % 18);
      dut.g_code[1].u_dupt.g_copy[0].u_mem.mem[a] ^= 32'd1 << (k % 32);
      dut.g_code[2].u_dupt.g_copy[0].u_mem.mem[a] ^= 22'd1 << (k % 22);
      dut.g_code[1].u_dups.g_copy[0].u_mem.mem[a] ^= 32'd1 << (k % 32);
      dut.g_code[2].u_dups.g_copy[0].u_mem.mem[a] ^= 22'd1 << (k % 22);
    end else begin
      dut.g_code[0].u_dups.g_copy[1].u_mem.mem[a] ^= 18'd1 << (k % 18);
      dut.g_code[0].u_dupt.g_copy[1].u_mem.mem[a] ^= 18'd1 << (k % 18);
      dut.g_code[1].u_dupt.g_copy[1].u_mem.mem[a] ^= 32'd1 << (k % 32);
      dut.g_code[2].u_dupt.g_copy[1].u_mem.mem[a] ^= 22'd1 << (k % 22);
      dut.g_code[1].u_dups.g_copy[1].u_mem.mem[a] ^= 32'd1 << (k % 32);
      dut.g_code[2].u_dups.g_copy[1].u_mem.mem[a] ^= 22'd1 << (k % 22);
    end
    dut.u_eccs.u_mem.mem[a] ^= 22'd1 << (k % 22);
    dut.u_ecct.u_mem.mem[a] ^= 22'd1 << ((k + 3) % 22);
  endtask

  // upset in stage 0 of one code-protected SRL: one bit of the encoded word,
  // or the plain copy of a duplicated one
  task automatic upset_esrl(input int k);
    case (k % 8)
      0: begin dut.g_esrl[0].u_esrl.u_enc_srl.sr[0] ^= 18'd1 << (k % 18); dut.g_esrl[0].u_esrlx.u_enc_srl.sr[0] ^= 18'd1 << (k % 18); end
      1: begin dut.g_esrl[1].u_esrl.u_enc_srl.sr[0] ^= 32'd1 << (k % 32); dut.g_esrl[1].u_esrlx.u_enc_srl.sr[0] ^= 32'd1 << (k % 32); end
      2: begin dut.g_esrl[2].u_esrl.u_enc_srl.sr[0] ^= 22'd1 << (k % 22); dut.g_esrl[2].u_esrlx.u_enc_srl.sr[0] ^= 22'd1 << (k % 22); end
      3: begin dut.g_esrl[3].u_esrl.u_enc_srl.sr[0] ^= 22'd1 << (k % 22); dut.g_esrl[3].u_esrlx.u_enc_srl.sr[0] ^= 22'd1 << (k % 22); end
      4: begin dut.g_esrl[0].u_esrl.g_dup.u_plain_srl.sr[0] ^= 16'h0180; dut.g_esrl[0].u_esrlx.g_dup.u_plain_srl.sr[0] ^= 16'h0180; end
      5: begin dut.g_esrl[1].u_esrl.g_dup.u_plain_srl.sr[0] ^= 16'h0180; dut.g_esrl[1].u_esrlx.g_dup.u_plain_srl.sr[0] ^= 16'h0180; end
      6: begin dut.g_esrl[2].u_esrl.u_enc_srl.sr[0] ^= 22'd1 << ((k + 5) % 22); dut.g_esrl[2].u_esrlx.u_enc_srl.sr[0] ^= 22'd1 << ((k + 5) % 22); end
      default: begin dut.g_esrl[3].u_esrl.g_dup.u_plain_srl.sr[0] ^= 16'h0180; dut.g_esrl[3].u_esrlx.g_dup.u_plain_srl.sr[0] ^= 16'h0180; end
    endcase
  endtask

  task automatic upset_srl(input int s, input int k);
    case (k % 3)
      0: dut.u_srl.g_dom[0].u_srl.sr[s] ^= 16'h0081;
      1: dut.u_srl.g_dom[1].u_srl.sr[s] ^= 16'h0081;
      default: dut.u_srl.g_dom[2].u_srl.sr[s] ^= 16'h0081;
    endcase
  endtask

  function automatic int scrub_bad();
    int n = 0;
    for (int a = 0; a < BD; a++)
      if (dut.u_bram_scrub.g_dom[0].u_bram.mem[a] != bmodel[a] ||
          dut.u_bram_scrub.g_dom[1].u_bram.mem[a] != bmodel[a] ||
          dut.u_bram_scrub.g_dom[2].u_bram.mem[a] != bmodel[a]) n++;
    return n;
  endfunction

  function automatic int dupb_bad();
    int n = 0;
    for (int a = 0; a < BD; a++) begin
      if (dut.g_code[0].u_dupb.g_copy[0].u_bram.mem[a] != dut.g_code[0].u_dupb.g_copy[1].u_bram.mem[a]) n++;
      if (dut.g_code[1].u_dupb.g_copy[0].u_bram.mem[a] != dut.g_code[1].u_dupb.g_copy[1].u_bram.mem[a]) n++;
      if (dut.g_code[2].u_dupb.g_copy[0].u_bram.mem[a] != dut.g_code[2].u_dupb.g_copy[1].u_bram.mem[a]) n++;
    end
    return n;
  endfunction

  function automatic int tmr_bad();
    int n = 0;
    for (int a = 0; a < BD; a++)
      if (dut.u_tmr_bram.g_dom[0].g_bram.u_mem.mem[a] != bmodel[a] ||
          dut.u_tmr_bram.g_dom[1].g_bram.u_mem.mem[a] != bmodel[a] ||
          dut.u_tmr_bram.g_dom[2].g_bram.u_mem.mem[a] != bmodel[a]) n++;
    return n;
  endfunction

  // One clock of traffic. Checks every output against the models.
  task automatic cycle(input int ba, input logic bwe, input logic [15:0] bd,
                       input int la, input logic lwe, input logic [15:0] ld,
                       input logic ce, input logic fb, input logic [15:0] sd);
    logic [15:0] bexp, lexp, sexp, snext;
    int a_prev;
    @(negedge clk);
    bexp = bmodel[ba];
    bram_all(bwe, ba, bd);
    lexp = lmodel[la];
    lut_all(0, la, 16'h0);
    srl_ce = ce; srl_fb = fb; srl_din = sd;
    #1;
    // combinational reads: LUTRAM designs and SRL
    for (int d = 0; d < 3; d++) begin
      check(lut_scrub_dout[d] == lexp, "TMR LUTRAM scrubber output");
      check(srl_dout[d] == smodel[LD-1], "TMR SRL output");
      check(esrl_dout[d] == smodel[LD-1], $sformatf("code-protected SRL %0d output", d));
      check(dups_dout[d] == lexp, $sformatf("dup+code %0d LUTRAM scrubber output", d));
      for (int e = 0; e < 3; e++)
        check(dupt_dout[d][e] == lexp && !dupt_dbl_err[d][e], $sformatf("dup+code %0d triplicated LUTRAM scrubber output %0d", d, e));
    end
    check(eccs_dout == lexp && !eccs_err, "SEC/DED LUTRAM scrubber output");
    for (int e = 0; e < 3; e++)
      check(ecct_dout[e] == lexp && !ecct_err[e], $sformatf("triplicated SEC/DED LUTRAM scrubber output %0d", e));
    check(esrl_dout[3] == smodel[LD-1], "code-protected SRL 3 output");
    if (esrl_err[0] || esrl_err[1] || esrl_err[3]) n_esw++;
    if (esrl_corr[2] || esrl_corr[3]) n_ecorr++;
    // the triplicated-logic SRLs get the same upsets and must behave alike
    for (int v = 0; v < 4; v++)
      for (int e = 0; e < 3; e++)
        check(esrlx_dout[v][e] == smodel[LD-1] && esrlx_err[v][e] == esrl_err[v] && esrlx_corr[v][e] == esrl_corr[v],
              $sformatf("triplicated code-protected SRL %0d output %0d", v, e));
    if (esrlx_err[0][0] || esrlx_err[1][0] || esrlx_err[3][0]) n_eswx++;
    snext = fb ? smodel[LD-1] : sd;
    if (lwe) lut_all(1, la, ld);
    @(posedge clk);
    if (ce) begin
      for (int s = LD - 1; s > 0; s--) smodel[s] = smodel[s-1];
      smodel[0] = snext;
    end
    #1;
    // synchronous reads: block-RAM designs (read-first)
    for (int d = 0; d < 3; d++) begin
      check(bram_scrub_dout[d] == bexp, "TMR BRAM scrubber output");
      check(tmr_bram_dout[d] == bexp, "TMR BRAM output");
      check(dup_dout[d] == bexp, $sformatf("dup+code %0d BRAM output", d));
      if (dup_err[d]) n_sw[d]++;
      for (int e = 0; e < 3; e++)
        check(dupx_dout[d][e] == bexp && dupx_err[d][e] == dup_err[d], $sformatf("triplicated dup+code %0d BRAM output %0d", d, e));
      if (dupx_err[d][0]) n_swx++;
      for (int e = 0; e < 3; e++)
        check(dupb_dout[d][e] == bexp && !dupb_err[d][e], $sformatf("dup+code %0d BRAM scrubber output %0d at %0d", d, e, ba));
    end
    if (tmr_bram_dout[0] == bexp && dut.u_tmr_bram.rdata[0] != dut.u_tmr_bram.rdata[1]) n_mask++;
    if (!ecc_err) check(ecc_dout == bexp, "ECC BRAM output");
    else n_ded++;
    if (ecc_corr) n_corr++;
    for (int e = 0; e < 3; e++)
      check(eccx_err[e] == ecc_err && eccx_corr[e] == ecc_corr && (ecc_err || eccx_dout[e] == bexp),
            $sformatf("triplicated ECC BRAM output %0d", e));
    if (eccx_corr[0]) n_corrx++;
  endtask

  initial begin
    bram_all(0, 0, 0);
    lut_all(0, 0, 0);
    for (int s = 0; s < LD; s++) smodel[s] = '0;
    for (int a = 0; a < LD; a++) lmodel[a] = '0;
    for (int a = 0; a < BD; a++) bmodel[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // fill
    for (int a = 0; a < BD; a++)
      cycle(a, 1, 16'($urandom), a % LD, 1, 16'($urandom), 1, 0, 16'($urandom));
    // upsets and traffic: the upset addresses are apart so that no two upsets share a word
    for (int r = 0; r < 600; r++) begin
      int a;
      if (r % 3 == 0) begin
        upset_bram((r * 7) % BD, r);
        upset_lut((r / 3) % LD, r);
        upset_srl(r % LD, r);
        // one word at a time: stage 0 holds a new word by the next upset
        if (r % 20 == 0) upset_esrl(r / 20);
      end
      a = (r % 2 == 0) ? (r * 7) % BD : $urandom_range(0, BD - 1);
      // some user writes aimed at the word the scrubber is on
      if (r % 5 == 4) a = int'(dut.u_bram_scrub.scrub_addr[0]);
      cycle(a, (r % 5 == 4) || (r % 11 == 0), 16'($urandom),
            (r / 3) % LD, (r % 13 == 0), 16'($urandom),
            $urandom_range(0, 3) != 0, r >= 300, 16'($urandom));
    end
    // let the scrubbers finish with reads of random words: a duplicated BRAM
    // scrubber may need the rest of a full scrub (3 clocks per word), one read
    // sweep to find the next error (2 per word) and one more full scrub
    for (int i = 0; i < 8 * BD + 200; i++)
      cycle($urandom_range(0, BD - 1), 0, 0, $urandom_range(0, LD - 1), 0, 0, 1, 1, 0);
    check(scrub_bad() == 0, $sformatf("scrubbed BRAM clean (%0d bad words)", scrub_bad()));
    check(tmr_bad() > 0, "unscrubbed TMR BRAM still holds upsets");
    check(dupb_bad() == 0, $sformatf("duplicated BRAM scrubbers clean (%0d bad words)", dupb_bad()));

    check(n_mask > 0, "TMR voter masking happened");
    check(n_scrub > 0, "BRAM scrub write-back happened");
    check(n_prec > 0, "user write hit the scrub address");
    check(n_lrep > 0, "TMR LUTRAM repair on read happened");
    check(n_fb > 0 && n_nfb > 0, "SRL feedback and non-feedback shifting happened");
    for (int c = 0; c < 3; c++) begin
      check(n_sw[c] > 0, $sformatf("dup+code %0d switched to the duplicate", c));
      check(n_drep[c] > 0, $sformatf("dup+code %0d LUTRAM repair on read happened", c));
    end
    check(n_corr > 0, "SEC/DED correction happened");
    check(n_erep > 0, "SEC/DED LUTRAM repair on read happened");
    for (int c = 0; c < 3; c++) check(n_full[c] > 0, $sformatf("dup+code %0d full-memory scrub happened", c));
    check(n_ded > 0, "SEC/DED double-error detection happened");
    check(n_eswx > 0, "triplicated code-protected SRL switched to its plain copy");
    check(n_swx > 0, "triplicated dup+code BRAM switched to the duplicate");
    check(n_corrx > 0, "triplicated SEC/DED BRAM corrected a word");
    check(n_esw > 0, "code-protected SRL switched to its plain copy");
    check(n_trep > 0, "triplicated dup+code LUTRAM scrubbers repaired on read");
    check(n_trep_e > 0, "triplicated SEC/DED LUTRAM scrubber repaired on read");
    check(n_ecorr > 0, "code-protected SRL corrected a SEC/DED word");
    $display("swx=%0d corrx=%0d eswx=%0d", n_swx, n_corrx, n_eswx);
    $display("esw=%0d ecorr=%0d trep=%0d trep_e=%0d", n_esw, n_ecorr, n_trep, n_trep_e);
    $display("full=%0d/%0d/%0d erep=%0d", n_full[0], n_full[1], n_full[2], n_erep);
    $display("mask=%0d scrub=%0d prec=%0d lrep=%0d fb=%0d nfb=%0d sw=%0d/%0d/%0d drep=%0d/%0d/%0d corr=%0d ded=%0d",
             n_mask, n_scrub, n_prec, n_lrep, n_fb, n_nfb, n_sw[0], n_sw[1], n_sw[2],
             n_drep[0], n_drep[1], n_drep[2], n_corr, n_ded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
