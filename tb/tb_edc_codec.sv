// tb_edc_codec: tests the encoder and decoder of all three codes.
//   parity : code word = data plus two odd-parity bits computed here
//            independently; every single-bit error and the all-zeros word
//            must be detected; the all-ones word is a valid code word.
//   CD     : code word = {~data, data}; every single-bit error and every
//            adjacent unidirectional burst must be detected.
//   SEC/DED: clean words decode unchanged; every single-bit error of every
//            position is corrected; every double-bit error is detected.
module tb_edc_codec;
  import ftmem_pkg::*;
  logic [15:0] data;
  logic [17:0] cw_p, cwe_p;
  logic [31:0] cw_c, cwe_c;
  logic [21:0] cw_s, cwe_s;
  logic [15:0] dp, dc, ds;
  logic ep, ec, es, cp, cc, cs;
  int checks = 0, failures = 0;

  edc_encoder #(.CODE(CODE_PARITY)) u_ep (.data, .cw(cw_p));
  edc_decoder #(.CODE(CODE_PARITY)) u_dp (.cw(cwe_p), .data(dp), .err(ep), .corr(cp));
  edc_encoder #(.CODE(CODE_CD))     u_ec (.data, .cw(cw_c));
  edc_decoder #(.CODE(CODE_CD))     u_dc (.cw(cwe_c), .data(dc), .err(ec), .corr(cc));
  edc_encoder #(.CODE(CODE_SECDED)) u_es (.data, .cw(cw_s));
  edc_decoder #(.CODE(CODE_SECDED)) u_ds (.cw(cwe_s), .data(ds), .err(es), .corr(cs));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (data %h)", what, data); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic pe, po;
      data = (n == 0) ? 16'h0000 : (n == 1) ? 16'hFFFF : 16'($urandom);
      #1;
      pe = 1'b1; po = 1'b1;
      for (int i = 0; i < 16; i += 2) pe ^= data[i];
      for (int i = 1; i < 16; i += 2) po ^= data[i];
      check(cw_p == {po, pe, data}, "parity encoding");
      check(cw_c == {~data, data}, "CD encoding");
      // clean words
      cwe_p = cw_p; cwe_c = cw_c; cwe_s = cw_s; #1;
      check(!ep && dp == data, "parity clean");
      check(!ec && dc == data, "CD clean");
      check(!es && !cs && ds == data, "SEC/DED clean");
      // single-bit errors
      for (int b = 0; b < 32; b++) begin
        if (b < 18) begin cwe_p = cw_p ^ (18'd1 << b); #1; check(ep, $sformatf("parity detects bit %0d", b)); end
        cwe_c = cw_c ^ (32'd1 << b); #1; check(ec, $sformatf("CD detects bit %0d", b));
        if (b < 22) begin
          cwe_s = cw_s ^ (22'd1 << b); #1;
          check(!es && cs && ds == data, $sformatf("SEC/DED corrects bit %0d", b));
        end
      end
      // double-bit errors
      for (int b = 0; b < 22; b++)
        for (int b2 = b + 1; b2 < 22; b2++) begin
          cwe_s = cw_s ^ (22'd1 << b) ^ (22'd1 << b2); #1;
          check(es, $sformatf("SEC/DED detects bits %0d,%0d", b, b2));
        end
      // unidirectional adjacent bursts on CD (all ones forced over a run of 4)
      for (int b = 0; b < 29; b++) begin
        logic [31:0] m;
        m = 32'hF << b;
        if ((cw_c | m) != cw_c) begin cwe_c = cw_c | m; #1; check(ec, "CD detects a 1-burst"); end
      end
    end
    // all-zeros and all-ones stored words fail odd parity
    cwe_p = '0; #1; check(ep, "parity detects all zeros");
    // An all-ones word holds 9 ones per group, which odd parity accepts.
    cwe_p = '1; #1; check(!ep, "parity accepts all ones (9 ones per group)");
    cwe_c = '0; #1; check(ec, "CD detects all zeros");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
