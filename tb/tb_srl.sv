// tb_srl: shifts random words through the SRL with a random clock enable and
// checks every tap position against a reference queue.
module tb_srl;
  localparam int unsigned W = 16, DEPTH = 16, AW = 4;
  logic clk = 1'b0, ce = 0;
  logic [W-1:0] din = 0, dout;
  logic [AW-1:0] addr = 0;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  srl #(.W(W), .DEPTH(DEPTH)) dut (.*);

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
      ce = $urandom_range(0, 3) != 0; din = W'($urandom); addr = AW'($urandom);
      #1;
      checks++;
      if (dout != model[addr]) begin failures++; $display("FAIL tap %0d", addr); end
      @(posedge clk);
      if (ce) begin
        for (int k = DEPTH - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
