// tb_tmr_srl: checks the TMR SRL in non-feedback mode (a 16-deep delay line of
// random words, with an upset in one copy masked at the output) and in feedback
// mode (contents recirculate with a period of 16 enabled clocks, and an upset
// in one copy is replaced by the voted word when it passes the tap).
module tb_tmr_srl;
  localparam int unsigned W = 16, DEPTH = 16, AW = 4;
  logic clk = 1'b0, ce = 0, fb = 0;
  logic [W-1:0] din = 0;
  logic [AW-1:0] addr = AW'(DEPTH - 1);
  logic [W-1:0] dout [3];
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0, fb_shifts = 0;

  tmr_srl #(.W(W), .DEPTH(DEPTH), .TRIPLE_VOTERS(1'b1)) dut (.*);

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

  task automatic upset(input int k, input int s, input logic [W-1:0] m);
    case (k)
      0: dut.g_dom[0].u_srl.sr[s] ^= m;
      1: dut.g_dom[1].u_srl.sr[s] ^= m;
      default: dut.g_dom[2].u_srl.sr[s] ^= m;
    endcase
  endtask

  function automatic int copies_bad();
    int n = 0;
    for (int s = 0; s < DEPTH; s++) begin
      if (dut.g_dom[0].u_srl.sr[s] != model[s]) n++;
      if (dut.g_dom[1].u_srl.sr[s] != model[s]) n++;
      if (dut.g_dom[2].u_srl.sr[s] != model[s]) n++;
    end
    return n;
  endfunction

  task automatic step();
    logic [W-1:0] nin;
    nin = fb ? model[DEPTH - 1] : din;
    @(posedge clk);
    if (ce) begin
      for (int k = DEPTH - 1; k > 0; k--) model[k] = model[k-1];
      model[0] = nin;
      if (fb) fb_shifts++;
    end
  endtask

  initial begin
    for (int s = 0; s < DEPTH; s++) model[s] = '0;
    // non-feedback: random data, random clock enable
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ce = $urandom_range(0, 3) != 0; din = W'($urandom);
      if (i % 20 == 10) upset($urandom_range(0, 2), $urandom_range(0, DEPTH - 1), W'($urandom) | 1);
      #1;
      for (int d = 0; d < 3; d++) check(dout[d] == model[DEPTH - 1], "non-feedback output");
      step();
    end
    // flush upsets out, then switch to feedback
    for (int i = 0; i < DEPTH; i++) begin @(negedge clk); ce = 1; din = W'($urandom); step(); end
    #1 check(copies_bad() == 0, "upsets shifted out in non-feedback mode");
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      fb = 1;
      ce = $urandom_range(0, 2) != 0;
      if (i % 40 == 5) upset($urandom_range(0, 2), $urandom_range(0, DEPTH - 1), W'($urandom) | 1);
      #1;
      for (int d = 0; d < 3; d++) check(dout[d] == model[DEPTH - 1], "feedback output");
      step();
    end
    for (int i = 0; i < DEPTH; i++) begin @(negedge clk); ce = 1; step(); end
    #1 check(copies_bad() == 0, "feedback rewrote upset stages with the voted word");
    check(fb_shifts > DEPTH, "feedback mode exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
