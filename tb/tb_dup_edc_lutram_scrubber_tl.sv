// tb_dup_edc_lutram_scrubber_tl: checks duplication with a code, scrubbing on
// read and triplicated logic, for all three codes; every domain's output is
// checked. An upset in either copy must not reach the output, and reading the
// word must rewrite the bad copy with the correct code word. Unread words stay
// upset. Errors in both copies that the code cannot repair are reported on
// dbl_err by every domain and nothing is rewritten.
module tb_dup_edc_lutram_scrubber_tl;
  import ftmem_pkg::*;
  localparam int unsigned DEPTH = 16, AW = 4;
  logic clk = 1'b0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [15:0] din = 0;
  logic [15:0] dout [3][3];  // [code][domain]
  logic dbl [3][3];
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0, repairs = 0;

  dup_edc_lutram_scrubber_tl #(.CODE(CODE_PARITY)) u_par (.clk, .we, .addr, .din, .dout(dout[0]), .dbl_err(dbl[0]));
  dup_edc_lutram_scrubber_tl #(.CODE(CODE_CD))     u_cd  (.clk, .we, .addr, .din, .dout(dout[1]), .dbl_err(dbl[1]));
  dup_edc_lutram_scrubber_tl #(.CODE(CODE_SECDED)) u_sec (.clk, .we, .addr, .din, .dout(dout[2]), .dbl_err(dbl[2]));

  always #5 clk = ~clk;
  always @(posedge clk) if (!we && (u_par.mwe[0] || u_par.mwe[1])) repairs++;

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

  // Reference encoders, independent of the design: parity and CD layouts.
  function automatic logic [17:0] enc_p(input logic [15:0] d);
    logic pe = 1, po = 1;
    for (int i = 0; i < 16; i += 2) pe ^= d[i];
    for (int i = 1; i < 16; i += 2) po ^= d[i];
    return {po, pe, d};
  endfunction

  task automatic upset(input int k, input int a, input int b);
    if (k == 0) begin
      u_par.g_copy[0].u_mem.mem[a] ^= 18'd1 << (b % 18);
      u_cd.g_copy[0].u_mem.mem[a]  ^= 32'd1 << b;
      u_sec.g_copy[0].u_mem.mem[a] ^= 22'd1 << (b % 22);
    end else begin
      u_par.g_copy[1].u_mem.mem[a] ^= 18'd1 << (b % 18);
      u_cd.g_copy[1].u_mem.mem[a]  ^= 32'd1 << b;
      u_sec.g_copy[1].u_mem.mem[a] ^= 22'd1 << (b % 22);
    end
  endtask

  logic [21:0] sec_ref [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; addr = AW'(a); din = 16'($urandom); model[a] = din;
      @(posedge clk); #1 sec_ref[a] = u_sec.g_copy[0].u_mem.mem[a];
    end
    @(negedge clk); we = 0; addr = 0;
    for (int r = 0; r < 100; r++) begin
      int a, other, k;
      a = $urandom_range(0, DEPTH - 1);
      other = (a + 5) % DEPTH;
      k = r % 2;
      @(negedge clk); addr = AW'(a);
      upset(k, a, $urandom_range(0, 31));
      upset(1 - k, other, $urandom_range(0, 31));
      #1;
      for (int i = 0; i < 3; i++) for (int d = 0; d < 3; d++) check(dout[i][d] == model[a], $sformatf("code %0d domain %0d masks upset in copy %0d", i, d, k));
      @(negedge clk);
      check(u_par.g_copy[0].u_mem.mem[a] == enc_p(model[a]) && u_par.g_copy[1].u_mem.mem[a] == enc_p(model[a]),
            "parity copies repaired");
      check(u_cd.g_copy[0].u_mem.mem[a] == {~model[a], model[a]} && u_cd.g_copy[1].u_mem.mem[a] == {~model[a], model[a]},
            "CD copies repaired");
      check(u_sec.g_copy[0].u_mem.mem[a] == sec_ref[a] && u_sec.g_copy[1].u_mem.mem[a] == sec_ref[a],
            "SEC/DED copies repaired");
      check(u_cd.g_copy[0].u_mem.mem[other] != u_cd.g_copy[1].u_mem.mem[other], "unread word stays upset");
      // repair the unread word by reading it
      addr = AW'(other);
      @(negedge clk);
      check(u_cd.g_copy[0].u_mem.mem[other] == {~model[other], model[other]} &&
            u_cd.g_copy[1].u_mem.mem[other] == {~model[other], model[other]}, "read repairs it");
    end
    // both copies of one parity word bad: reported, not rewritten
    u_par.g_copy[0].u_mem.mem[3] ^= 18'd1;
    u_par.g_copy[1].u_mem.mem[3] ^= 18'd2;
    @(negedge clk); addr = 3; #1;
    check(dbl[0][0] && dbl[0][1] && dbl[0][2], "double error reported");
    @(negedge clk);
    check(u_par.g_copy[0].u_mem.mem[3] == (enc_p(model[3]) ^ 18'd1), "no rewrite from a bad pair");
    check(repairs > 0, "repairs counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
