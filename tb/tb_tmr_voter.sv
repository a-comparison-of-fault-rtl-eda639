// tb_tmr_voter: checks the bitwise majority and the disagreement flag of the
// voter against an independent per-bit count, on random words with zero, one
// or two copies corrupted.
module tb_tmr_voter;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, c, y;
  logic mismatch;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] good, exp;
      good = W'($urandom);
      a = good; b = good; c = good;
      case (i % 4)
        1: a ^= W'($urandom);
        2: b ^= W'($urandom);
        3: begin b ^= W'($urandom); c ^= W'($urandom); end
        default: ;
      endcase
      #1;
      for (int k = 0; k < W; k++) exp[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++;
      if (y !== exp) begin failures++; $display("FAIL vote %h %h %h -> %h", a, b, c, y); end
      if (i % 4 != 3) begin
        checks++;
        if (y !== good) begin failures++; $display("FAIL single upset not masked"); end
      end
      checks++;
      if (mismatch !== !(a == b && b == c)) begin failures++; $display("FAIL mismatch flag"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
