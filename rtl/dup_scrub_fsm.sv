// dup_scrub_fsm: scrub controller for a BRAM protected by duplication with a
// code (one of three identical copies, one per redundancy domain).
//
// It walks the triple counter's address through S_READ (address on the second
// BRAM port), S_CHECK (decoded words back) and, when a write is due, S_WRITE
// (the good word, encoded again, is written into both copies). Unlike the TMR
// scrubber, which repairs only the word found wrong, it rewrites the whole
// memory. A code cannot see every upset (a wrong word that is itself a valid
// code word passes), so as soon as
// any error is reported at the scrub address the FSM enters full-scrub mode and
// rewrites every address of the memory, starting there, until the counter is
// back at that address. Outside full-scrub mode clean addresses are only read.
// No write is issued when both copies report an error the code cannot repair
// (dbl), or when a user write hits the scrub address (the user write takes
// precedence, and cancels a pending write-back).
// Timing: two clocks per address read, three per address rewritten. Unlike the
// TMR scrub controller this one is not pipelined.
// Synchronous active-low reset; no write during reset.
// Whole-memory scrubbing on any detected error and user-write precedence follow
// the document; the states and the end-of-sweep rule are this design's.
module dup_scrub_fsm #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          err_any,
  input  logic          dbl,
  input  logic [AW-1:0] scrub_addr,
  input  logic          user_we,
  input  logic [AW-1:0] user_addr,
  output logic          we,
  output logic          en,
  output logic          full
);
  typedef enum logic [1:0] {S_READ, S_CHECK, S_WRITE} state_e;
  state_e        state, state_nx;
  logic          hit, user_hit;
  logic [AW-1:0] start;
  logic          full_nx;
  logic [AW-1:0] start_nx;

  assign user_hit = user_we && (user_addr == scrub_addr);

  always_comb begin
    state_nx = state;
    full_nx  = full;
    start_nx = start;
    we       = 1'b0;
    en       = 1'b0;
    case (state)
      S_READ:  state_nx = S_CHECK;
      S_CHECK: begin
        if (!full && err_any) begin
          full_nx  = 1'b1;
          start_nx = scrub_addr;
        end
        if ((full || err_any) && !dbl && !hit && !user_hit) state_nx = S_WRITE;
        else begin
          en       = 1'b1;
          state_nx = S_READ;
        end
      end
      default: begin  // S_WRITE
        we       = !user_hit && rst_n;
        en       = 1'b1;
        state_nx = S_READ;
      end
    endcase
    // full-scrub mode ends when the counter is about to return to its start
    if (en && full_nx && (scrub_addr + AW'(1)) == start_nx) full_nx = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_READ;
      hit   <= 1'b0;
      full  <= 1'b0;
      start <= '0;
    end else begin
      state <= state_nx;
      hit   <= (state == S_READ) && user_hit;
      full  <= full_nx;
      start <= start_nx;
    end
  end
endmodule
