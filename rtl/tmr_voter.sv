// tmr_voter: bitwise two-out-of-three majority voter.
//
// y is the majority of a, b and c in every bit, so a wrong value in any one copy
// is out-voted. mismatch is set when the three copies do not all agree, that is
// when at least one copy differs from the majority; the scrubbers use it to learn
// that some copy holds an upset. The voter is purely combinational.
// The majority vote is the TMR voter of the document; the mismatch output is this
// design's addition for the scrub controllers.
module tmr_voter #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);
  always_comb begin
    y        = (a & b) | (a & c) | (b & c);
    mismatch = (a != b) || (a != c);
  end
endmodule
