// tb_lutram: random writes and combinational reads of the LUTRAM compared with a
// reference array.
module tb_lutram;
  localparam int unsigned W = 16, DEPTH = 16, AW = 4;
  logic clk = 1'b0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  lutram #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1; waddr = AW'($urandom); wdata = W'($urandom);
      raddr = AW'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
