// tb_tmr_memory: checks TMR without scrubbing in its two forms: block RAM with
// three voters, and LUTRAM with one voter. Upsets in one copy are masked on
// every output and remain in the copy until the word is rewritten.
module tb_tmr_memory;
  localparam int unsigned W = 16, DEPTH = 64, AW = 6;
  logic clk = 1'b0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [W-1:0] din = 0;
  logic [W-1:0] dout_b [3], dout_l [3];
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  tmr_memory #(.W(W), .DEPTH(DEPTH), .BRAM(1'b1), .TRIPLE_VOTERS(1'b1)) dut_b (
    .clk, .we, .addr, .din, .dout(dout_b));
  tmr_memory #(.W(W), .DEPTH(DEPTH), .BRAM(1'b0), .TRIPLE_VOTERS(1'b0)) dut_l (
    .clk, .we, .addr, .din, .dout(dout_l));

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

  task automatic upset(input int k, input int a, input logic [W-1:0] m);
    case (k)
      0: begin dut_b.g_dom[0].g_bram.u_mem.mem[a] ^= m; dut_l.g_dom[0].g_lut.u_mem.mem[a] ^= m; end
      1: begin dut_b.g_dom[1].g_bram.u_mem.mem[a] ^= m; dut_l.g_dom[1].g_lut.u_mem.mem[a] ^= m; end
      default: begin dut_b.g_dom[2].g_bram.u_mem.mem[a] ^= m; dut_l.g_dom[2].g_lut.u_mem.mem[a] ^= m; end
    endcase
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; addr = AW'(a); din = W'($urandom); model[a] = din;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) upset(a % 3, a, W'($urandom) | 1);
    for (int pass = 0; pass < 2; pass++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk); addr = AW'(a); #1;
        for (int d = 0; d < 3; d++) check(dout_l[d] == model[a], "LUTRAM single voter masks upset");
        @(posedge clk); #1;
        for (int d = 0; d < 3; d++) check(dout_b[d] == model[a], "BRAM three voters mask upset");
      end
    // upsets are still there: no scrubbing
    check(dut_b.g_dom[1].g_bram.u_mem.mem[1] != model[1], "upset persists in BRAM copy");
    check(dut_l.g_dom[2].g_lut.u_mem.mem[2] != model[2], "upset persists in LUTRAM copy");
    // a second upset of the same bit in another copy defeats the vote
    // (address 3 already has bit 0 of copy 0 upset)
    upset(1, 3, 16'h0001); upset(2, 3, 16'h0001);
    @(negedge clk); addr = 3; @(posedge clk); #1;
    check(dout_b[0] != model[3], "two copies with the same bit upset out-vote the good one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
