// edc_encoder: encoder for the error detecting/correcting codes of the design.
//
// Turns a 16-bit word into a code word of cw_width(CODE) bits; purely
// combinational.
//   CODE_PARITY: cw = {p1, p0, data}. p0 covers the even data bits, p1 the odd
//     ones (2-bit interlaced parity), each chosen so that its group including
//     the parity bit holds an odd number of ones. A stored word of all zeros
//     therefore fails the check; one of all ones (nine ones per group) passes.
//   CODE_CD: cw = {~data, data} (complement duplicate); the encoder is only an
//     inverter.
//   CODE_SECDED: a (22,16) extended Hamming code. cw[21:1] is a Hamming code
//     word by position (check bits at positions 1, 2, 4, 8, 16, data bits in the
//     other positions in ascending order), cw[0] is the parity of cw[21:1].
// The three codes and their widths follow the document; the bit layouts and
// the choice of an extended Hamming code for SEC/DED are this design's.
module edc_encoder
  import ftmem_pkg::*;
#(
  parameter code_e CODE = CODE_PARITY,
  localparam int unsigned CW = cw_width(CODE)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CW-1:0]     cw
);
  if (CODE == CODE_PARITY) begin : g_par
    always_comb begin
      logic pe, po;
      pe = 1'b1;
      po = 1'b1;
      for (int i = 0; i < DATA_W; i += 2) pe ^= data[i];
      for (int i = 1; i < DATA_W; i += 2) po ^= data[i];
      cw = {po, pe, data};
    end
  end else if (CODE == CODE_CD) begin : g_cd
    assign cw = {~data, data};
  end else begin : g_secded
    always_comb begin
      logic [21:0] h;
      h = '0;
      for (int i = 0; i < DATA_W; i++) h[secded_pos(i)] = data[i];
      for (int k = 0; k < 5; k++) begin
        logic p;
        p = 1'b0;
        for (int pos = 1; pos <= 21; pos++)
          if (((pos >> k) & 1) != 0 && pos != (1 << k)) p ^= h[pos];
        h[1 << k] = p;
      end
      h[0] = ^h[21:1];
      cw = CW'(h);
    end
  end
endmodule
