// tmr_srl: an SRL shift register protected by TMR.
//
// Three DEPTH-stage, W-bit SRLs share the clock enable and the static tap
// address. Each is read at the tap and the three outputs are voted. In
// non-feedback mode (fb = 0) all three take din; in feedback mode (fb = 1) each
// SRL takes the voted output, so the register recirculates its contents and a
// wrong word in one copy is replaced by the voted word as it passes the tap.
// With TRIPLE_VOTERS = 1 each domain has its own voter and feeds its own SRL
// from it; with TRIPLE_VOTERS = 0 one voter drives all three outputs and all
// three feedback paths.
// Timing: dout is combinational from the tap; the SRLs shift on clock edges
// with ce set.
// Feedback and non-feedback modes and both voter arrangements follow the
// document; the fb input selecting the mode is this design's.
module tmr_srl #(
  parameter int unsigned W             = 16,
  parameter int unsigned DEPTH         = 16,
  parameter bit          TRIPLE_VOTERS = 1'b1,
  localparam int unsigned AW           = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          fb,
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  dout [3]
);
  logic [W-1:0] q    [3];
  logic [W-1:0] vote [3];

  for (genvar d = 0; d < 3; d++) begin : g_dom
    srl #(.W(W), .DEPTH(DEPTH)) u_srl (
      .clk, .ce, .din(fb ? vote[d] : din), .addr, .dout(q[d])
    );

    if (TRIPLE_VOTERS || d == 0) begin : g_vote
      tmr_voter #(.W(W)) u_vote (
        .a(q[0]), .b(q[1]), .c(q[2]), .y(vote[d]), .mismatch()
      );
    end else begin : g_share
      assign vote[d] = vote[0];
    end
    assign dout[d] = vote[d];
  end
endmodule
