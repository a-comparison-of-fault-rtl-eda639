// tb_tmr_bram_scrubber: self-checking test of the TMR BRAM scrubber.
//
// Fills the memory with random words, then upsets words in single copies
// (random bit flips, and one copy wiped to zero as a write-enable upset would),
// checks that reads are still correct through the voters, and checks that after
// one scrub sweep all three copies again equal a reference model. It also
// measures the sweep period of a clean memory (one clock per address) and
// checks that a user write to an address being scrubbed is not overwritten.
module tb_tmr_bram_scrubber;
  localparam int unsigned W = 16, DEPTH = 1024, AW = 10;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  din = '0;
  logic [W-1:0]  dout [3];
  logic [W-1:0]  model [DEPTH];
  int checks = 0, failures = 0;

  tmr_bram_scrubber #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write(input logic [AW-1:0] a, input logic [W-1:0] d);
    @(negedge clk);
    we = 1'b1; addr = a; din = d;
    @(negedge clk);
    we = 1'b0;
    model[a] = d;
  endtask

  task automatic read_check(input logic [AW-1:0] a);
    @(negedge clk);
    addr = a;
    @(posedge clk);
    #1;
    for (int d = 0; d < 3; d++)
      check(dout[d] == model[a], $sformatf("read addr %0d out %0d: %h vs %h", a, d, dout[d], model[a]));
  endtask

  function automatic int copies_bad();
    int n = 0;
    for (int a = 0; a < DEPTH; a++) begin
      if (dut.g_dom[0].u_bram.mem[a] != model[a]) n++;
      if (dut.g_dom[1].u_bram.mem[a] != model[a]) n++;
      if (dut.g_dom[2].u_bram.mem[a] != model[a]) n++;
    end
    return n;
  endfunction

  task automatic upset(input int k, input int a, input logic [W-1:0] mask);
    case (k)
      0: dut.g_dom[0].u_bram.mem[a] ^= mask;
      1: dut.g_dom[1].u_bram.mem[a] ^= mask;
      default: dut.g_dom[2].u_bram.mem[a] ^= mask;
    endcase
  endtask

  int t0, t1, n_scrub = 0;
  always @(posedge clk) if (dut.scrub_we != 3'b000) n_scrub++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int a = 0; a < DEPTH; a++) write(AW'(a), W'($urandom));
    for (int i = 0; i < 50; i++) read_check(AW'($urandom_range(0, DEPTH-1)));

    // Sweep period of a clean memory: the scrub address returns to 0 every DEPTH clocks.
    @(posedge clk iff dut.scrub_addr[0] == '0);
    t0 = int'($time / 10);
    @(posedge clk iff dut.scrub_addr[0] != '0);
    @(posedge clk iff dut.scrub_addr[0] == '0);
    t1 = int'($time / 10);
    check(t1 - t0 == DEPTH, $sformatf("sweep period %0d, expected %0d", t1 - t0, DEPTH));
    check(n_scrub == 0, "no scrub writes on a clean memory");

    // Random single-copy upsets: masked on read, then repaired by scrubbing.
    // (at most one copy per address, since two copies wrong in one bit cannot be out-voted)
    for (int i = 0; i < 200; i++) upset($urandom_range(0, 2), (i * 5) % DEPTH, W'($urandom) | W'(1));
    check(copies_bad() > 0, "upsets present");
    for (int i = 0; i < 50; i++) read_check(AW'($urandom_range(0, DEPTH-1)));
    repeat (2 * DEPTH + 300) @(posedge clk);
    check(copies_bad() == 0, $sformatf("all upsets scrubbed (%0d words still wrong)", copies_bad()));
    check(n_scrub > 0, "scrub writes happened");

    // Whole copy wiped (write-enable upset with a stepping address).
    for (int a = 0; a < DEPTH; a++) dut.g_dom[1].u_bram.mem[a] = '0;
    for (int i = 0; i < 20; i++) read_check(AW'($urandom_range(0, DEPTH-1)));
    repeat (3 * DEPTH + 50) @(posedge clk);
    check(copies_bad() == 0, $sformatf("wiped copy restored (%0d words wrong)", copies_bad()));

    // User writes while words are upset: the user data must survive.
    for (int i = 0; i < 300; i++) begin
      int a;
      a = (i * 3) % DEPTH;
      upset($urandom_range(0, 2), a, 16'h0101);
      write(AW'(a), W'($urandom));
      if (i % 3 == 0) write(AW'(dut.scrub_addr[0]), W'($urandom));
    end
    repeat (2 * DEPTH + 300) @(posedge clk);
    check(copies_bad() == 0, $sformatf("user writes kept and upsets scrubbed (%0d wrong)", copies_bad()));
    for (int a = 0; a < DEPTH; a += 7) read_check(AW'(a));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
