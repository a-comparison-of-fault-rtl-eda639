// edc_decoder: checker/corrector for the codes produced by edc_encoder.
//
// Purely combinational. err means an error was detected that the code cannot
// repair; corr means a single-bit error was found and corrected (SEC/DED only).
//   CODE_PARITY: err when either interlaced group fails odd parity.
//   CODE_CD: err when the upper half is not the inverse of the lower half.
//   CODE_SECDED: the 5-bit syndrome and the overall parity decide. Syndrome 0
//     with good overall parity is a clean word; bad overall parity is a single
//     error (in the overall parity bit when the syndrome is 0, else at the
//     position the syndrome names), which is corrected; a non-zero syndrome with
//     good overall parity is a double error, reported by err. A syndrome that
//     points beyond position 21 is reported by err as well.
// data is the (corrected) user word; with err set it is not to be trusted.
module edc_decoder
  import ftmem_pkg::*;
#(
  parameter code_e CODE = CODE_PARITY,
  localparam int unsigned CW = cw_width(CODE)
) (
  input  logic [CW-1:0]     cw,
  output logic [DATA_W-1:0] data,
  output logic              err,
  output logic              corr
);
  if (CODE == CODE_PARITY) begin : g_par
    always_comb begin
      logic pe, po;
      pe = cw[DATA_W];
      po = cw[DATA_W+1];
      for (int i = 0; i < DATA_W; i += 2) pe ^= cw[i];
      for (int i = 1; i < DATA_W; i += 2) po ^= cw[i];
      data = cw[DATA_W-1:0];
      err  = !(pe && po);
      corr = 1'b0;
    end
  end else if (CODE == CODE_CD) begin : g_cd
    always_comb begin
      data = cw[DATA_W-1:0];
      err  = (cw[CW-1:DATA_W] != ~cw[DATA_W-1:0]);
      corr = 1'b0;
    end
  end else begin : g_secded
    always_comb begin
      logic [21:0] h;
      logic [4:0]  syn;
      logic        par;
      h   = 22'(cw);
      syn = '0;
      for (int k = 0; k < 5; k++)
        for (int pos = 1; pos <= 21; pos++)
          if (((pos >> k) & 1) != 0) syn[k] ^= h[pos];
      par  = ^h;
      err  = 1'b0;
      corr = 1'b0;
      if (par) begin
        corr = 1'b1;
        if (syn > 5'd21) begin
          err  = 1'b1;
          corr = 1'b0;
        end else begin
          h[syn] = ~h[syn];
        end
      end else if (syn != '0) begin
        err = 1'b1;
      end
      for (int i = 0; i < DATA_W; i++) data[i] = h[secded_pos(i)];
    end
  end
endmodule
