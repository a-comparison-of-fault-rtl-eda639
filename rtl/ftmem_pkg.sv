// ftmem_pkg: types and constants shared by the fault-tolerant memory designs.
//
// Every protected memory stores 16-bit user words. A BRAM holds 1024 of them, a
// LUTRAM or SRL 16. The three error detecting/correcting codes and the width of
// the code word each produces for a 16-bit word are defined here:
//   CODE_PARITY : 2-bit interlaced odd parity, 16 + 2 = 18 bits
//   CODE_CD     : complement duplicate, the word and its inverse, 32 bits
//   CODE_SECDED : extended Hamming single-error-correct/double-error-detect, 22 bits
// These widths match the bit counts of the BRAM cost comparison (for example a
// parity-protected copy plus a plain copy is 34 bits per word). The code word
// layouts themselves are this design's choice and are described in edc_encoder.
package ftmem_pkg;

  localparam int unsigned DATA_W     = 16;
  localparam int unsigned BRAM_DEPTH = 1024;
  localparam int unsigned LUT_DEPTH  = 16;

  typedef enum logic [1:0] {
    CODE_PARITY = 2'd0,
    CODE_CD     = 2'd1,
    CODE_SECDED = 2'd2
  } code_e;

  // Width of the code word for a 16-bit data word.
  function automatic int unsigned cw_width(code_e code);
    case (code)
      CODE_PARITY: return DATA_W + 2;
      CODE_CD:     return 2 * DATA_W;
      default:     return DATA_W + 6;
    endcase
  endfunction

  // Code word of the all-zero data word: the power-up contents of an encoded
  // memory, so that a word never written still decodes without error.
  function automatic logic [2*DATA_W-1:0] cw_of_zero(code_e code);
    case (code)
      CODE_PARITY: return (2*DATA_W)'(2'b11 << DATA_W);
      CODE_CD:     return {{DATA_W{1'b1}}, {DATA_W{1'b0}}};
      default:     return '0;
    endcase
  endfunction

  // Position of data bit i (0..15) inside the 21-bit Hamming part of a SEC/DED
  // code word: the data bits fill the positions 1..21 that are not powers of two.
  function automatic int unsigned secded_pos(int unsigned i);
    int unsigned pos = 0;
    int unsigned n   = 0;
    for (int unsigned p = 1; p <= 21; p++) begin
      if ((p & (p - 1)) != 0) begin
        if (n == i) pos = p;
        n++;
      end
    end
    return pos;
  endfunction

  // User request to a single-ported protected memory.
  typedef struct packed {
    logic                   we;
    logic [9:0]             addr;
    logic [DATA_W-1:0]      data;
  } bram_req_t;

  typedef struct packed {
    logic                   we;
    logic [3:0]             addr;
    logic [DATA_W-1:0]      data;
  } lut_req_t;

endpackage
