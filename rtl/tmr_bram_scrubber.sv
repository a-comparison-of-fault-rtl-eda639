// tmr_bram_scrubber: a BRAM protected by TMR with deterministic scrubbing.
//
// Three dual-ported BRAMs (one per redundancy domain) hold the same DEPTH x W
// contents. The user's single set of inputs (we, addr, din) drives port A of all
// three; the three port-A outputs go to three voters, giving three voted copies
// of the read data (dout[0..2]) for a triplicated system downstream.
// Port B of every BRAM belongs to the scrubber. A triple counter supplies the
// scrub address of each domain. Each domain votes the three port-B words; its
// FSM writes the voted word back into its own BRAM when the three words
// disagree, then advances the counter. Every address is visited in turn, so an
// upset in one copy is removed within one sweep (DEPTH clocks plus one per
// repaired word) even if
// the user never reads or writes it, and a write-enable upset that corrupts one
// copy is repaired before it can accumulate.
// Timing: port A reads are synchronous, dout follows addr by one clock. A user
// write takes precedence over a scrub write to the same address.
// The organisation (three BRAMs, three voters, three FSMs, triple counter,
// second port for scrubbing, separate write-enable logic per domain) follows
// the document; the pipelined scrub controller, the voter mismatch flag and
// reset are this design's choices.
module tmr_bram_scrubber #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout [3]
);
  logic [W-1:0]  a_dout [3];
  logic [W-1:0]  b_dout [3];
  logic [W-1:0]  b_vote [3];
  logic          b_mis  [3];
  logic [AW-1:0] scrub_addr [3];
  logic [AW-1:0] b_addr     [3];
  logic [2:0]    scrub_we;
  logic [2:0]    cnt_en;

  triple_counter #(.AW(AW)) u_cnt (
    .clk, .rst_n, .en(cnt_en), .addr(scrub_addr)
  );

  for (genvar d = 0; d < 3; d++) begin : g_dom
    bram_dp #(.W(W), .DEPTH(DEPTH)) u_bram (
      .clk,
      .a_we(we), .a_addr(addr), .a_din(din), .a_dout(a_dout[d]),
      .b_we(scrub_we[d]), .b_addr(b_addr[d]), .b_din(b_vote[d]), .b_dout(b_dout[d])
    );

    tmr_voter #(.W(W)) u_scrub_vote (
      .a(b_dout[0]), .b(b_dout[1]), .c(b_dout[2]), .y(b_vote[d]), .mismatch(b_mis[d])
    );

    bram_scrub_fsm #(.AW(AW)) u_fsm (
      .clk, .rst_n, .mismatch(b_mis[d]), .scrub_addr(scrub_addr[d]),
      .user_we(we), .user_addr(addr), .we(scrub_we[d]), .en(cnt_en[d]), .b_addr(b_addr[d])
    );

    tmr_voter #(.W(W)) u_out_vote (
      .a(a_dout[0]), .b(a_dout[1]), .c(a_dout[2]), .y(dout[d]), .mismatch()
    );
  end
endmodule
