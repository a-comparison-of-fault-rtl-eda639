// bram_dp: dual-ported block RAM with synchronous reads.
//
// Port A serves the user of the memory, port B a scrubber: the memories are
// single-ported for the user and scrubbing takes the second port. Both ports
// read synchronously (data appears one clock after the address) and read the
// old contents when they write the same address in the same cycle. When both
// ports write one address in one cycle, port A (the user write) wins: a user
// write repairs the word anyway, so the scrub write is dropped.
// The dual-port organisation and the write precedence follow the document; the
// read-first behaviour and the initial contents (every word INIT, zero by
// default) are this design's choice.
module bram_dp #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024,
  parameter logic [W-1:0] INIT  = '0,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_din,
  output logic [W-1:0]  a_dout,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_din,
  output logic [W-1:0]  b_dout
);
  logic [W-1:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = INIT;

  always_ff @(posedge clk) begin
    a_dout <= mem[a_addr];
    b_dout <= mem[b_addr];
    if (b_we && !(a_we && a_addr == b_addr)) mem[b_addr] <= b_din;
    if (a_we) mem[a_addr] <= a_din;
  end
endmodule
