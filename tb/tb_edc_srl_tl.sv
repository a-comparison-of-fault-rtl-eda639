// tb_edc_srl_tl: checks the four code-protected SRLs with triplicated logic
// (parity + duplication, CD + duplication, SEC/DED, SEC/DED + duplication) at
// 16 stages of 16 bits; the output and flags of every domain are checked.
// Non-feedback mode: random words under a random clock enable must leave the
// tap after 16 enabled shifts; single-bit upsets in the encoded SRL, and any
// upset in the plain SRL, must not reach the output. Feedback mode: contents
// recirculate; an upset word is output correctly and re-enters both SRLs clean,
// so after two full rotations every stage must hold a valid code word of the
// right data. A reference model shifts the plain words; code word validity is
// judged by functions written here (odd group parity, complement halves,
// Hamming syndrome and overall parity).
module tb_edc_srl_tl;
  import ftmem_pkg::*;
  localparam int unsigned DEPTH = 16, AW = 4;
  logic clk = 1'b0, ce = 0, fb = 0;
  logic [DATA_W-1:0] din = 0;
  logic [AW-1:0] addr = AW'(DEPTH - 1);
  logic [DATA_W-1:0] dout [4][3];
  logic err [4][3], corr [4][3];
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0, n_err = 0, n_corr = 0;

  edc_srl_tl #(.CODE(CODE_PARITY), .DUP(1'b1)) u_par  (.clk, .ce, .fb, .din, .addr, .dout(dout[0]), .err(err[0]), .corr(corr[0]));
  edc_srl_tl #(.CODE(CODE_CD),     .DUP(1'b1)) u_cd   (.clk, .ce, .fb, .din, .addr, .dout(dout[1]), .err(err[1]), .corr(corr[1]));
  edc_srl_tl #(.CODE(CODE_SECDED), .DUP(1'b0)) u_sec  (.clk, .ce, .fb, .din, .addr, .dout(dout[2]), .err(err[2]), .corr(corr[2]));
  edc_srl_tl #(.CODE(CODE_SECDED), .DUP(1'b1)) u_secd (.clk, .ce, .fb, .din, .addr, .dout(dout[3]), .err(err[3]), .corr(corr[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit par_ok(logic [17:0] c, logic [DATA_W-1:0] d);
    logic pe = 1'b0, po = 1'b0;
    for (int i = 0; i < 18; i += 2) pe ^= (i < 16) ? c[i] : c[16];
    for (int i = 1; i < 18; i += 2) po ^= (i < 16) ? c[i] : c[17];
    return pe && po && c[15:0] == d;
  endfunction

  function automatic bit cd_ok(logic [31:0] c, logic [DATA_W-1:0] d);
    return c[15:0] == d && c[31:16] == ~d;
  endfunction

  function automatic bit sec_ok(logic [21:0] c, logic [DATA_W-1:0] d);
    int unsigned syn = 0;
    for (int p = 1; p <= 21; p++) if (c[p]) syn ^= p;
    for (int i = 0; i < DATA_W; i++) if (c[secded_pos(i)] != d[i]) return 1'b0;
    return syn == 0 && ^c == 1'b0;
  endfunction

  // stages of every SRL that do not hold (a valid code word of) the model word
  function automatic int stages_bad();
    int n = 0;
    for (int s = 0; s < DEPTH; s++) begin
      if (!par_ok(u_par.u_enc_srl.sr[s], model[s])) n++;
      if (u_par.g_dup.u_plain_srl.sr[s] != model[s]) n++;
      if (!cd_ok(u_cd.u_enc_srl.sr[s], model[s])) n++;
      if (u_cd.g_dup.u_plain_srl.sr[s] != model[s]) n++;
      if (!sec_ok(u_sec.u_enc_srl.sr[s], model[s])) n++;
      if (!sec_ok(u_secd.u_enc_srl.sr[s], model[s])) n++;
      if (u_secd.g_dup.u_plain_srl.sr[s] != model[s]) n++;
    end
    return n;
  endfunction

  // one upset: a single bit of an encoded stage, or any bits of a plain stage
  task automatic upset(input int k, input int s, input int b);
    case (k % 7)
      0: u_par.u_enc_srl.sr[s][b % 18] ^= 1'b1;
      1: u_cd.u_enc_srl.sr[s][b % 32] ^= 1'b1;
      2: u_sec.u_enc_srl.sr[s][b % 22] ^= 1'b1;
      3: u_secd.u_enc_srl.sr[s][b % 22] ^= 1'b1;
      4: u_par.g_dup.u_plain_srl.sr[s] ^= 16'(b) | 16'h1;
      5: u_cd.g_dup.u_plain_srl.sr[s] ^= 16'(b) | 16'h1;
      default: u_secd.g_dup.u_plain_srl.sr[s] ^= 16'(b) | 16'h1;
    endcase
  endtask

  task automatic step();
    logic [DATA_W-1:0] nin;
    nin = fb ? model[DEPTH - 1] : din;
    @(posedge clk);
    if (ce) begin
      for (int k = DEPTH - 1; k > 0; k--) model[k] = model[k-1];
      model[0] = nin;
    end
  endtask

  task automatic check_out(input string mode);
    for (int v = 0; v < 4; v++) begin
      for (int d = 0; d < 3; d++) begin
        check(dout[v][d] == model[DEPTH - 1], $sformatf("%s output of variant %0d, domain %0d", mode, v, d));
        check(err[v][d] == err[v][0] && corr[v][d] == corr[v][0], $sformatf("%s flags of variant %0d agree, domain %0d", mode, v, d));
      end
      if (err[v][0]) n_err++;
      if (corr[v][0]) n_corr++;
    end
    check(!err[2][0], "SEC/DED SRL reports no uncorrectable error for a single upset");
  endtask

  initial begin
    for (int s = 0; s < DEPTH; s++) model[s] = '0;
    #1 check(stages_bad() == 0, "all stages start as valid zero words");
    // non-feedback: random data and clock enable, one upset every 20 clocks
    // (at most one upset per stage at a time: a stage upset is shifted out
    // within 16 enabled clocks, fewer than the 20 between upsets)
    for (int i = 0; i < 700; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 3) != 0; din = 16'($urandom); fb = 0;
      if (i % 20 == 10) upset(i / 20, $urandom_range(0, DEPTH - 1), $urandom);
      #1 check_out("non-feedback");
      step();
    end
    for (int i = 0; i < DEPTH + 4; i++) begin @(negedge clk); ce = 1; din = 16'($urandom); step(); end
    #1 check(stages_bad() == 0, "upsets shifted out in non-feedback mode");
    // feedback: the contents recirculate; each upset must be cleaned when it
    // passes the tap, so it is given two rotations before the next one
    for (int i = 0; i < 1400; i++) begin
      @(negedge clk);
      fb = 1; ce = $urandom_range(0, 3) != 0;
      if (i % 40 == 5) upset(i / 40, $urandom_range(0, DEPTH - 1), $urandom);
      #1 check_out("feedback");
      step();
    end
    for (int i = 0; i < 2 * DEPTH; i++) begin @(negedge clk); ce = 1; #1 check_out("feedback"); step(); end
    #1 check(stages_bad() == 0, "feedback repaired every stage");
    check(n_err > 0, "an uncorrectable error was reported at the tap");
    check(n_corr > 0, "a SEC/DED correction was reported at the tap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
