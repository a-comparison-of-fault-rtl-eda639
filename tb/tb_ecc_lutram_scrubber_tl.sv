// tb_ecc_lutram_scrubber_tl: checks the SEC/DED LUTRAM with scrubbing on read
// and triplicated logic; the flags and outputs of all three domains are checked.
// A single upset bit is corrected on the output and repaired in the memory by
// the read, so a second upset later in the same word is again only a single
// error; a word that is never read keeps its upset; a double error is reported
// and left in place.
module tb_ecc_lutram_scrubber_tl;
  localparam int unsigned DEPTH = 16, AW = 4;
  logic clk = 1'b0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [15:0] din = 0, dout [3];
  logic err [3], corr [3];
  logic [15:0] model [DEPTH];
  logic [21:0] clean [DEPTH];
  int checks = 0, failures = 0, repairs = 0;

  ecc_lutram_scrubber_tl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!we && dut.mwe) repairs++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // all three domains agree on the flags and output
  function automatic bit all3(input bit e, input bit c, input logic [15:0] d);
    bit ok = 1'b1;
    for (int i = 0; i < 3; i++) ok &= (err[i] == e) && (corr[i] == c) && (dout[i] == d);
    return ok;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; addr = AW'(a); din = 16'($urandom); model[a] = din;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) clean[a] = dut.u_mem.mem[a];
    for (int r = 0; r < 100; r++) begin
      int a, b1, b2, other;
      a = $urandom_range(0, DEPTH - 1);
      other = (a + 3) % DEPTH;
      b1 = $urandom_range(0, 21);
      b2 = (b1 + 1 + $urandom_range(0, 20)) % 22;
      @(negedge clk); addr = AW'(a);
      dut.u_mem.mem[a] ^= 22'd1 << b1;
      dut.u_mem.mem[other] ^= 22'd1 << b1;
      #1;
      check(all3(0, 1, model[a]), "single error corrected on read");
      @(negedge clk);
      check(dut.u_mem.mem[a] == clean[a], "read repaired the word");
      check(dut.u_mem.mem[other] != clean[other], "unread word keeps its upset");
      // the repaired word takes a second upset: still only a single error
      dut.u_mem.mem[a] ^= 22'd1 << b2;
      #1;
      check(all3(0, 1, model[a]), "second upset after repair corrected");
      @(negedge clk);
      addr = AW'(other);
      @(negedge clk);
      check(dut.u_mem.mem[other] == clean[other] && dut.u_mem.mem[a] == clean[a], "both words repaired");
    end
    // double error: reported, not rewritten
    @(negedge clk); addr = 4'd5;
    dut.u_mem.mem[5] ^= 22'h000101;
    #1;
    check(err[0] && err[1] && err[2] && !corr[0] && !corr[1] && !corr[2], "double error reported");
    @(negedge clk);
    check(dut.u_mem.mem[5] == (clean[5] ^ 22'h000101), "double error left in place");
    check(repairs >= 200, $sformatf("repairs counted: %0d", repairs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
