// tb_bram_dp: random reads and writes on both ports of the dual-ported BRAM,
// compared with a reference array: synchronous read data, read-old-data on a
// write, and port A winning a same-address write collision.
module tb_bram_dp;
  localparam int unsigned W = 16, DEPTH = 64, AW = 6;
  logic clk = 1'b0;
  logic a_we = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [W-1:0] a_din = 0, b_din = 0, a_dout, b_dout;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0, collisions = 0;

  bram_dp #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ea, eb;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a_we = ($urandom_range(0, 2) == 0); b_we = ($urandom_range(0, 2) == 0);
      a_addr = AW'($urandom); b_addr = (i % 5 == 0) ? a_addr : AW'($urandom);
      a_din = W'($urandom); b_din = W'($urandom);
      ea = model[a_addr]; eb = model[b_addr];
      if (b_we && !(a_we && a_addr == b_addr)) model[b_addr] = b_din;
      if (a_we) model[a_addr] = a_din;
      if (a_we && b_we && a_addr == b_addr) collisions++;
      @(posedge clk); #1;
      checks += 2;
      if (a_dout != ea) begin failures++; $display("FAIL port A read %0d", a_addr); end
      if (b_dout != eb) begin failures++; $display("FAIL port B read %0d", b_addr); end
    end
    a_we = 0; b_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_addr = AW'(i); b_addr = AW'(i);
      @(posedge clk); #1;
      checks++;
      if (a_dout != model[i] || b_dout != model[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL no collisions exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
