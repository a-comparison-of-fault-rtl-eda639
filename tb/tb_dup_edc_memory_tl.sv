// tb_dup_edc_memory_tl: checks duplication with an error detecting/correcting
// code and triplicated logic, for all three codes (block RAM) and for parity
// in LUTRAM; the output and error flag of every domain are checked. Random
// upsets of the encoded copy, or of the plain copy, must never reach any
// domain's output; an error the code detects must switch every domain's output
// to the plain copy.
module tb_dup_edc_memory_tl;
  import ftmem_pkg::*;
  localparam int unsigned DEPTH = 32, AW = 5;
  logic clk = 1'b0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [15:0] din = 0;
  logic [15:0] dout [4][3];
  logic err [4][3];
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0, switched = 0;

  dup_edc_memory_tl #(.CODE(CODE_PARITY), .DEPTH(DEPTH), .BRAM(1'b1)) u_par (.clk, .we, .addr, .din, .dout(dout[0]), .err(err[0]));
  dup_edc_memory_tl #(.CODE(CODE_CD),     .DEPTH(DEPTH), .BRAM(1'b1)) u_cd  (.clk, .we, .addr, .din, .dout(dout[1]), .err(err[1]));
  dup_edc_memory_tl #(.CODE(CODE_SECDED), .DEPTH(DEPTH), .BRAM(1'b1)) u_sec (.clk, .we, .addr, .din, .dout(dout[2]), .err(err[2]));
  dup_edc_memory_tl #(.CODE(CODE_PARITY), .DEPTH(DEPTH), .BRAM(1'b0)) u_lut (.clk, .we, .addr, .din, .dout(dout[3]), .err(err[3]));

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
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; addr = AW'(a); din = 16'($urandom); model[a] = din;
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < 200; r++) begin
      int a, b;
      a = $urandom_range(0, DEPTH - 1);
      b = $urandom_range(0, 15);
      // restore both copies of every instance, then upset one copy
      @(negedge clk); we = 1; addr = AW'(a); din = model[a];
      @(negedge clk); we = 0;
      if (r % 2 == 0) begin
        u_par.g_bram.u_mem_enc.mem[a] ^= 18'd1 << (b + r % 3);
        u_cd.g_bram.u_mem_enc.mem[a]  ^= 32'd1 << (b + 16 * (r % 4 / 2));
        u_sec.g_bram.u_mem_enc.mem[a] ^= (22'd1 << b) | ((r % 4 == 0) ? 22'd1 << 21 : 22'd0);
        u_lut.g_lut.u_mem_enc.mem[a]  ^= 18'd1 << b;
      end else begin
        u_par.g_bram.u_mem_dup.mem[a] ^= 16'd1 << b;
        u_cd.g_bram.u_mem_dup.mem[a]  ^= 16'd1 << b;
        u_sec.g_bram.u_mem_dup.mem[a] ^= 16'd1 << b;
        u_lut.g_lut.u_mem_dup.mem[a]  ^= 16'd1 << b;
      end
      @(negedge clk); addr = AW'(a); #1;
      for (int d = 0; d < 3; d++) begin
        check(dout[3][d] == model[a], $sformatf("LUTRAM parity output, domain %0d", d));
        check(err[3][d] == (r % 2 == 0), $sformatf("LUTRAM parity error flag, domain %0d", d));
      end
      @(posedge clk); #1;
      for (int d = 0; d < 3; d++) begin
        for (int i = 0; i < 3; i++) check(dout[i][d] == model[a], $sformatf("BRAM code %0d output, domain %0d", i, d));
        check(err[0][d] == (r % 2 == 0) && err[1][d] == (r % 2 == 0), $sformatf("parity/CD error flag, domain %0d", d));
        // SEC/DED: a double error (r % 4 == 0) is detected and switches to the plain copy
        check(err[2][d] == (r % 4 == 0), $sformatf("SEC/DED double error flag, domain %0d", d));
      end
      if (err[0][0]) switched++;
    end
    check(switched > 0, "output switched to the duplicate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
