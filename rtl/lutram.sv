// lutram: distributed (LUT-based) RAM.
//
// One synchronous write port and one asynchronous read port, as a LUTRAM built
// from FPGA look-up tables offers. A single-ported user drives the same address
// on both; the scrubbers use the read port to check a word and the write port
// (through a multiplexer) to repair it. Every word starts as INIT (zero by
// default).
// The 16 x 16 size follows the document; a single write enable for the whole
// word is this design's choice.
module lutram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16,
  parameter logic [W-1:0] INIT  = '0,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = INIT;

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
