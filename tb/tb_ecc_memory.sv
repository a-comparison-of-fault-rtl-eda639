// tb_ecc_memory: checks the SEC/DED-only memory in block RAM and LUTRAM form.
// A single upset bit in a stored code word is corrected (corr set, data right);
// two upset bits are reported (err set).
module tb_ecc_memory;
  localparam int unsigned DEPTH = 32, AW = 5;
  logic clk = 1'b0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [15:0] din = 0, dout_b, dout_l;
  logic err_b, corr_b, err_l, corr_l;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  ecc_memory #(.DEPTH(DEPTH), .BRAM(1'b1)) u_b (.clk, .we, .addr, .din, .dout(dout_b), .err(err_b), .corr(corr_b));
  ecc_memory #(.DEPTH(DEPTH), .BRAM(1'b0)) u_l (.clk, .we, .addr, .din, .dout(dout_l), .err(err_l), .corr(corr_l));

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
      @(negedge clk); we = 0;
      if (kind >= 1) begin u_b.g_bram.u_mem.mem[a] ^= 22'd1 << b1; u_l.g_lut.u_mem.mem[a] ^= 22'd1 << b1; end
      if (kind == 2) begin u_b.g_bram.u_mem.mem[a] ^= 22'd1 << b2; u_l.g_lut.u_mem.mem[a] ^= 22'd1 << b2; end
      #1;
      check(err_l == (kind == 2) && corr_l == (kind == 1), "LUTRAM flags");
      if (kind < 2) check(dout_l == model[a], "LUTRAM data");
      @(posedge clk); #1;
      check(err_b == (kind == 2) && corr_b == (kind == 1), "BRAM flags");
      if (kind < 2) check(dout_b == model[a], "BRAM data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
