// tb_bram_scrub_fsm: checks the per-domain scrub controller on its own. The
// testbench plays the triple counter (scrub_addr advances at each clock with en
// set) and the voter (mismatch is raised in the clock in which the word of a
// chosen address is back). Checked: one clock per clean address with the
// counter address on the port; for an upset address, a write-back to that
// address in the following clock with the counter held, then the held address
// read next; no write-back when a user write hits the address while it is
// read or checked; a mismatch in the clock after a repair is ignored; no write
// while reset is asserted.
module tb_bram_scrub_fsm;
  localparam int unsigned AW = 4;
  logic clk = 1'b0, rst_n = 1'b0, mismatch = 0, user_we = 0;
  logic [AW-1:0] scrub_addr = 0, user_addr = 0;
  logic we, en;
  logic [AW-1:0] b_addr;
  int checks = 0, failures = 0;
  // address read in the previous clock (-1: none)
  int prev_read = -1;
  // the counter steps at the falling edge after a clock with en set, so that
  // the controller samples a stable scrub_addr at the rising edge
  bit step = 0;

  bram_scrub_fsm #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one clock: bad = the word read in the previous clock is upset,
  // uw/ua = user write; returns what the controller did
  task automatic tick(input bit bad, input bit uw, input int ua,
                      output bit w, output bit e, output int ba);
    @(negedge clk);
    if (step) scrub_addr++;
    mismatch = bad; user_we = uw; user_addr = AW'(ua);
    #1;
    w = we; e = en; ba = int'(b_addr);
    @(posedge clk);
    prev_read = (e) ? int'(scrub_addr) : -1;
    step = e;
  endtask

  initial begin
    bit w, e;
    int ba, x;
    // reset: no write whatever the mismatch input says
    for (int i = 0; i < 4; i++) begin
      tick(1, 0, 0, w, e, ba);
      check(!w, "no write during reset");
    end
    rst_n = 1;
    tick(0, 0, 0, w, e, ba);
    for (int r = 0; r < 20; r++) begin
      // clean addresses: one per clock, counter address on the port
      for (int i = 0; i < 5; i++) begin
        x = (int'(scrub_addr) + int'(step)) % (1 << AW);
        tick(0, 0, 0, w, e, ba);
        check(!w && e && ba == x, "clean address read in one clock");
      end
      // upset address: the clock after it is read becomes a repair
      x = prev_read;
      tick(1, 0, 0, w, e, ba);
      check(w && !e && ba == x, $sformatf("repair of %0d: we %b en %b addr %0d", x, w, e, ba));
      // the held counter address is read next; a mismatch now is stale
      x = int'(scrub_addr);
      tick(1, 0, 0, w, e, ba);
      check(!w && e && ba == x, "no repair from the read issued in a repair clock");
      // user write to the address while it is read cancels its repair
      x = (int'(scrub_addr) + int'(step)) % (1 << AW);
      tick(0, 1, x, w, e, ba);
      tick(1, 0, 0, w, e, ba);
      check(!w && e, "user write during the read cancels the repair");
      // user write to the address while it is checked cancels its repair
      x = prev_read;
      tick(1, 1, x, w, e, ba);
      check(!w && e, "user write during the check cancels the repair");
      // user write elsewhere does not
      x = prev_read;
      tick(1, 1, x + 7, w, e, ba);
      check(w && ba == x, "user write to another address leaves the repair");
      tick(0, 0, 0, w, e, ba);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
