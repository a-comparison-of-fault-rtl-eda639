// tb_ecc_memory_tl: checks the SEC/DED-only memory with triplicated logic in
// block RAM and LUTRAM form; the output and flags of every domain are checked.
// A single upset bit in a stored code word is corrected (corr set, data right);
// two upset bits are reported (err set).
module tb_ecc_memory_tl;
  localparam int unsigned DEPTH = 32, AW = 5;
  logic clk = 1'b0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [15:0] din = 0, dout_b [3], dout_l [3];
  logic err_b [3], corr_b [3], err_l [3], corr_l [3];
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  ecc_memory_tl #(.DEPTH(DEPTH), .BRAM(1'b1)) u_b (.clk, .we, .addr, .din, .dout(dout_b), .err(err_b), .corr(corr_b));
  ecc_memory_tl #(.DEPTH(DEPTH), .BRAM(1'b0)) u_l (.clk, .we, .addr, .din, .dout(dout_l), .err(err_l), .corr(corr_l));

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

  initial begin
    for (int r = 0; r < 300; r++) begin
      int a, b1, b2, kind;
      a = $urandom_range(0, DEPTH - 1);
      b1 = $urandom_range(0, 21);
      b2 = (b1 + 1 + $urandom_range(0, 20)) % 22;
      kind = r % 3;  // 0 clean, 1 single, 2 double
      @(negedge clk); we = 1; addr = AW'(a); din = 16'($urandom); model[a] = din;
      @(negedge clk); we = 0; din = ~din;
      if (kind >= 1) begin u_b.g_bram.u_mem.mem[a] ^= 22'd1 << b1; u_l.g_lut.u_mem.mem[a] ^= 22'd1 << b1; end
      if (kind == 2) begin u_b.g_bram.u_mem.mem[a] ^= 22'd1 << b2; u_l.g_lut.u_mem.mem[a] ^= 22'd1 << b2; end
      #1;
      for (int d = 0; d < 3; d++) begin
        check(err_l[d] == (kind == 2) && corr_l[d] == (kind == 1), $sformatf("LUTRAM flags, domain %0d", d));
        if (kind < 2) check(dout_l[d] == model[a], $sformatf("LUTRAM data, domain %0d", d));
      end
      @(posedge clk); #1;
      for (int d = 0; d < 3; d++) begin
        check(err_b[d] == (kind == 2) && corr_b[d] == (kind == 1), $sformatf("BRAM flags, domain %0d", d));
        if (kind < 2) check(dout_b[d] == model[a], $sformatf("BRAM data, domain %0d", d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
