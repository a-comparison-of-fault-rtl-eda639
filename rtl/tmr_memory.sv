// tmr_memory: a BRAM or LUTRAM protected by TMR, without scrubbing.
//
// Three copies of a DEPTH x W memory are written together by the user's single
// set of inputs. With TRIPLE_VOTERS = 1 three voters each vote all three read
// words and drive one of dout[0..2] (TMR with triplicated voters); with
// TRIPLE_VOTERS = 0 a single voter drives all three outputs (TMR with a single
// voter, for a memory inside a non-triplicated system). Upsets in one copy are
// masked but stay in that copy until the word is rewritten.
// BRAM = 1 builds the copies from block RAM (synchronous read: dout follows
// addr by one clock); BRAM = 0 from LUTRAM (combinational read).
// Both voter arrangements follow the document; the parameter names and the
// user-port shape are this design's.
module tmr_memory #(
  parameter int unsigned W             = 16,
  parameter int unsigned DEPTH         = 1024,
  parameter bit          BRAM          = 1'b1,
  parameter bit          TRIPLE_VOTERS = 1'b1,
  localparam int unsigned AW           = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout [3]
);
  logic [W-1:0] rdata [3];
  logic [W-1:0] vote  [3];

  for (genvar d = 0; d < 3; d++) begin : g_dom
    if (BRAM) begin : g_bram
      bram_dp #(.W(W), .DEPTH(DEPTH)) u_mem (
        .clk,
        .a_we(we), .a_addr(addr), .a_din(din), .a_dout(rdata[d]),
        .b_we(1'b0), .b_addr('0), .b_din('0), .b_dout()
      );
    end else begin : g_lut
      lutram #(.W(W), .DEPTH(DEPTH)) u_mem (
        .clk, .we, .waddr(addr), .wdata(din), .raddr(addr), .rdata(rdata[d])
      );
    end

    if (TRIPLE_VOTERS || d == 0) begin : g_vote
      tmr_voter #(.W(W)) u_vote (
        .a(rdata[0]), .b(rdata[1]), .c(rdata[2]), .y(vote[d]), .mismatch()
      );
    end else begin : g_share
      assign vote[d] = vote[0];
    end
    assign dout[d] = vote[d];
  end
endmodule
