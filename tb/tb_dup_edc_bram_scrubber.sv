// tb_dup_edc_bram_scrubber: checks the duplicated, encoded BRAM with scrubbing
// for all three codes (64-word memories to keep sweeps short).
//  1. A word of copy 1 is replaced by another valid code word, an upset the
//     code cannot see: a sweep must leave it alone (nothing is detected) while
//     reads stay correct.
//  2. A detectable upset is then injected in copy 0 elsewhere: the scrubber
//     must switch to full-scrub mode, rewrite the whole memory and so also
//     remove the invisible upset, and leave full-scrub mode after one round.
//  3. User writes issued during full scrubbing must survive.
// Reads are compared with a reference model throughout.
module tb_dup_edc_bram_scrubber;
  import ftmem_pkg::*;
  localparam int unsigned DEPTH = 64, AW = 6;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [15:0] din = '0;
  logic [15:0] dout [3][3];  // [code][domain]
  logic err [3][3];
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;
  int n_wr [3] = '{0, 0, 0};

  dup_edc_bram_scrubber #(.CODE(CODE_PARITY), .DEPTH(DEPTH)) u_par (.clk, .rst_n, .we, .addr, .din, .dout(dout[0]), .err(err[0]));
  dup_edc_bram_scrubber #(.CODE(CODE_CD),     .DEPTH(DEPTH)) u_cd  (.clk, .rst_n, .we, .addr, .din, .dout(dout[1]), .err(err[1]));
  dup_edc_bram_scrubber #(.CODE(CODE_SECDED), .DEPTH(DEPTH)) u_sec (.clk, .rst_n, .we, .addr, .din, .dout(dout[2]), .err(err[2]));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (u_par.b_we[0]) n_wr[0]++;
    if (u_cd.b_we[0])  n_wr[1]++;
    if (u_sec.b_we[0]) n_wr[2]++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic write(input int a, input logic [15:0] d);
    @(negedge clk); we = 1; addr = AW'(a); din = d;
    @(negedge clk); we = 0;
    model[a] = d;
  endtask

  // idle clocks with reads of random addresses, outputs checked
  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk); addr = AW'(a);
      @(posedge clk); #1;
      for (int c = 0; c < 3; c++) for (int d = 0; d < 3; d++) check(dout[c][d] == model[a] && !err[c][d], $sformatf("code %0d domain %0d read %0d", c, d, a));
    end
  endtask

  function automatic int bad_words();
    int n = 0;
    for (int a = 0; a < DEPTH; a++) begin
      if (u_par.g_copy[0].u_bram.mem[a] != u_par.g_copy[1].u_bram.mem[a]) n++;
      if (u_cd.g_copy[0].u_bram.mem[a]  != u_cd.g_copy[1].u_bram.mem[a])  n++;
      if (u_sec.g_copy[0].u_bram.mem[a] != u_sec.g_copy[1].u_bram.mem[a]) n++;
    end
    return n;
  endfunction

  initial begin
    int w0 [3];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) write(a, 16'($urandom));
    run(2 * DEPTH);
    check(n_wr[0] == 0 && n_wr[1] == 0 && n_wr[2] == 0, "no scrub writes on a clean memory");

    // 1. invisible upset: copy 1 word 10 replaced by the valid code word of word 20
    u_par.g_copy[1].u_bram.mem[10] = u_par.g_copy[1].u_bram.mem[20];
    u_cd.g_copy[1].u_bram.mem[10]  = u_cd.g_copy[1].u_bram.mem[20];
    u_sec.g_copy[1].u_bram.mem[10] = u_sec.g_copy[1].u_bram.mem[20];
    run(3 * DEPTH);
    check(bad_words() == 3, $sformatf("invisible upset left alone (%0d differing words)", bad_words()));
    check(n_wr[0] == 0, "no scrub writes without a detected error");

    // 2. detectable single-bit upset in copy 0, word 40
    u_par.g_copy[0].u_bram.mem[40] ^= 18'h00010;
    u_cd.g_copy[0].u_bram.mem[40]  ^= 32'h00010;
    u_sec.g_copy[0].u_bram.mem[40] ^= 22'h00010;
    w0 = n_wr;
    // 3. user writes while the full scrub runs
    for (int i = 0; i < 20; i++) write($urandom_range(0, DEPTH - 1), 16'($urandom));
    run(3 * DEPTH + 20);
    check(bad_words() == 0, $sformatf("full scrub removed all upsets (%0d differing words)", bad_words()));
    for (int c = 0; c < 3; c++)
      check(n_wr[c] - w0[c] >= DEPTH - 2, $sformatf("code %0d rewrote the whole memory (%0d writes)", c, n_wr[c] - w0[c]));
    check(!u_par.g_dom[0].u_fsm.full && !u_cd.g_dom[0].u_fsm.full && !u_sec.g_dom[0].u_fsm.full, "full-scrub mode ended");
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); addr = AW'(a);
      @(posedge clk); #1;
      for (int c = 0; c < 3; c++) for (int d = 0; d < 3; d++) check(dout[c][d] == model[a], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
