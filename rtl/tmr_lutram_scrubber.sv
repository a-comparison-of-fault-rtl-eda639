// tmr_lutram_scrubber: a LUTRAM protected by TMR with non-deterministic scrubbing.
//
// Three DEPTH x W LUTRAMs (one per redundancy domain) are written together by
// the user's single set of inputs and read at the user's address. Each domain
// votes the three read words; the voted words are the triplicated outputs
// dout[0..2]. Scrubbing happens only when a word is read: in every clock in
// which the user does not write, each domain compares its own copy of the
// addressed word with its voted word and, if they differ, writes the voted word
// into its own copy through the LUTRAM's write port at the next clock edge. A
// user write always takes the write port first. Each domain's write enable is
// produced by that domain alone, so one upset cannot corrupt two copies.
// Timing: reads are combinational (dout follows addr in the same clock); writes
// and repairs take effect at the clock edge.
// Non-deterministic scrubbing of LUTRAMs, triplicated voters and independent
// write enables follow the document; treating every non-write clock as a read
// is this design's choice.
module tmr_lutram_scrubber #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout [3]
);
  logic [W-1:0] rdata [3];
  logic [W-1:0] vote  [3];
  logic [W-1:0] wdata [3];
  logic         mem_we [3];

  for (genvar d = 0; d < 3; d++) begin : g_dom
    tmr_voter #(.W(W)) u_vote (
      .a(rdata[0]), .b(rdata[1]), .c(rdata[2]), .y(vote[d]), .mismatch()
    );

    // Write-port multiplexer: the user write first, otherwise the repair.
    always_comb begin
      if (we) begin
        mem_we[d] = 1'b1;
        wdata[d]  = din;
      end else begin
        mem_we[d] = (rdata[d] != vote[d]);
        wdata[d]  = vote[d];
      end
    end

    lutram #(.W(W), .DEPTH(DEPTH)) u_mem (
      .clk, .we(mem_we[d]), .waddr(addr), .wdata(wdata[d]), .raddr(addr), .rdata(rdata[d])
    );

    assign dout[d] = vote[d];
  end
endmodule
