// tb_triple_counter: checks that the triplicated counter counts when a majority
// of its enables is set, holds otherwise, wraps at the end of the address space,
// and that an upset in one copy is repaired on the next clock edge.
module tb_triple_counter;
  localparam int unsigned AW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] en = '0;
  logic [AW-1:0] addr [3];
  int checks = 0, failures = 0;
  int unsigned model = 0;

  triple_counter #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    for (int d = 0; d < 3; d++) begin
      checks++;
      if (addr[d] != AW'(model)) begin
        failures++;
        $display("FAIL %s: copy %0d = %0d, expected %0d", what, d, addr[d], model);
      end
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    check_all("reset");
    for (int i = 0; i < 200; i++) begin
      en = 3'($urandom);
      @(negedge clk);
      if ((en[0] + en[1] + en[2]) >= 2) model = (model + 1) % (1 << AW);
      check_all("count");
      if (i % 10 == 5) begin
        // Upset one copy; with the enables low it must return to the voted value.
        en = 3'b000;
        case (i % 3)
          0: dut.cnt[0] = dut.cnt[0] ^ AW'(5);
          1: dut.cnt[1] = dut.cnt[1] ^ AW'(3);
          default: dut.cnt[2] = dut.cnt[2] ^ AW'(9);
        endcase
        @(negedge clk);
        check_all("repair");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
