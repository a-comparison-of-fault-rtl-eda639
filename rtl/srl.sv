// srl: LUT shift register (SRL) with clock enable and a tap address.
//
// On each clock edge with ce set, din enters stage 0 and every stage moves one
// place on. dout shows stage addr without a clock, so a static addr of DEPTH-1
// makes a DEPTH-long delay line. Every stage starts as INIT (zero by default).
// The 16-entry, 16-bit shape and static addressing follow the document.
module srl #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16,
  parameter logic [W-1:0] INIT  = '0,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  dout
);
  logic [W-1:0] sr [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) sr[i] = INIT;

  always_ff @(posedge clk) begin
    if (ce) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  assign dout = sr[addr];
endmodule
