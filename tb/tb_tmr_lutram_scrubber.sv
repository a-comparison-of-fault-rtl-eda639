// tb_tmr_lutram_scrubber: checks the TMR LUTRAM with scrubbing on read. Words
// upset in one copy must read correctly in the same clock, must be rewritten
// in that copy by the read, and must stay wrong while they are not read
// (scrubbing is non-deterministic). A user write that lands on an upset word
// must leave the user's data in all three copies.
module tb_tmr_lutram_scrubber;
  localparam int unsigned W = 16, DEPTH = 16, AW = 4;
  logic clk = 1'b0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [W-1:0] din = 0;
  logic [W-1:0] dout [3];
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0, repairs = 0;

  tmr_lutram_scrubber #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!we && (dut.mem_we[0] || dut.mem_we[1] || dut.mem_we[2])) repairs++;

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

  function automatic logic [W-1:0] copy(input int k, input int a);
    case (k)
      0: return dut.g_dom[0].u_mem.mem[a];
      1: return dut.g_dom[1].u_mem.mem[a];
      default: return dut.g_dom[2].u_mem.mem[a];
    endcase
  endfunction

  task automatic upset(input int k, input int a, input logic [W-1:0] m);
    case (k)
      0: dut.g_dom[0].u_mem.mem[a] ^= m;
      1: dut.g_dom[1].u_mem.mem[a] ^= m;
      default: dut.g_dom[2].u_mem.mem[a] ^= m;
    endcase
  endtask

  task automatic write(input int a, input logic [W-1:0] d);
    @(negedge clk); we = 1; addr = AW'(a); din = d;
    @(negedge clk); we = 0;
    model[a] = d;
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, W'($urandom));
    for (int r = 0; r < 50; r++) begin
      int k, a, other;
      k = $urandom_range(0, 2); a = $urandom_range(0, DEPTH - 1);
      other = (a + 1) % DEPTH;
      // read a: output masked in the same clock
      @(negedge clk); addr = AW'(a);
      upset(k, a, W'($urandom) | 1);
      upset((k + 1) % 3, other, 16'h8000);
      #1;
      for (int d = 0; d < 3; d++) check(dout[d] == model[a], "read masks the upset");
      @(negedge clk);
      check(copy(k, a) == model[a], "read repaired the copy");
      check(copy((k + 1) % 3, other) != model[other], "unread word stays upset");
      // the unread upset word is now written by the user
      write(other, W'($urandom));
      for (int d = 0; d < 3; d++) check(copy(d, other) == model[other], "user write lands in all copies");
    end
    check(repairs >= 50, $sformatf("repairs counted: %0d", repairs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
