// bram_scrub_fsm: scrub controller of one redundancy domain of the TMR BRAM
// scrubber.
//
// Each of the three domains has its own copy, so the write enable of each BRAM's
// scrub port is driven by logic of its own domain only. The controller is a
// two-stage pipeline on the BRAM's second port:
//   read   in every clock without a repair, the address from the triple counter
//          (scrub_addr) is put on the port (b_addr) and the counter is enabled;
//          the address is remembered as chk_addr.
//   check  one clock later the word read for chk_addr is back and has been
//          voted. If the three copies disagree (mismatch), this clock becomes a
//          repair: the port is switched to chk_addr, the voted word is written
//          back (we) and the counter holds, so the address it shows is read in
//          the next clock instead.
// A clean address therefore costs one clock and a repaired one two, so a clean
// sweep of a 1024-word memory takes 1024 clocks. The read issued in a repair
// clock is not checked. A user write to the address being read in that clock,
// or to chk_addr in the check clock, cancels the repair: the user write takes
// precedence and rewrites the word in all three copies, so the voted word read
// before it would be stale.
// Synchronous active-low reset; no scrub write is issued while reset is
// asserted, whatever state the registers powered up in.
// Repair only on a detected disagreement and user-write precedence follow the
// document; the pipeline and the cancellation rule are this design's.
module bram_scrub_fsm #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mismatch,
  input  logic [AW-1:0] scrub_addr,
  input  logic          user_we,
  input  logic [AW-1:0] user_addr,
  output logic          we,
  output logic          en,
  output logic [AW-1:0] b_addr
);
  logic          chk_valid;  // the port returns the word read for chk_addr
  logic [AW-1:0] chk_addr;
  logic          hit;        // the user wrote chk_addr while it was being read
  logic          user_hit;   // the user writes chk_addr now
  logic          collide;    // a user write overlaps the check of chk_addr
  logic          repair;

  assign user_hit = user_we && (user_addr == chk_addr);
  assign collide  = chk_valid && (hit || user_hit);
  assign repair   = chk_valid && mismatch && !collide;
  assign we       = repair && rst_n;
  assign en       = !repair;
  assign b_addr   = repair ? chk_addr : scrub_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chk_valid <= 1'b0;
      chk_addr  <= '0;
      hit       <= 1'b0;
    end else begin
      chk_valid <= !repair;
      chk_addr  <= scrub_addr;
      hit       <= user_we && (user_addr == scrub_addr);
    end
  end
endmodule
