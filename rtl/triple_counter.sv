// triple_counter: triplicated scrub address counter.
//
// Three copies of an AW-bit counter cycle through the whole address space of the
// three scrubbed BRAMs, one copy per redundancy domain. Each copy's next value is
// computed from the majority of all three copies, so an upset in one copy is
// repaired on the next clock edge. The three enable inputs (one from each
// domain's scrub FSM) are voted as well; when the voted enable is set every copy
// loads vote+1, otherwise every copy loads the vote. addr[d] feeds domain d.
// Synchronous active-low reset to address 0.
// The document asks for a triplicated counter "triplicated in a reliable way";
// the voted feedback used here is this design's choice of how.
module triple_counter #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    en,
  output logic [AW-1:0] addr [3]
);
  logic [AW-1:0] cnt [3];
  logic [AW-1:0] voted [3];
  logic          en_v  [3];

  for (genvar d = 0; d < 3; d++) begin : g_dom
    // Each domain has its own voter on the counter state and on the enables.
    tmr_voter #(.W(AW)) u_vote (
      .a(cnt[0]), .b(cnt[1]), .c(cnt[2]), .y(voted[d]), .mismatch()
    );
    assign en_v[d] = (en[0] & en[1]) | (en[0] & en[2]) | (en[1] & en[2]);

    always_ff @(posedge clk) begin
      if (!rst_n)       cnt[d] <= '0;
      else if (en_v[d]) cnt[d] <= voted[d] + AW'(1);
      else              cnt[d] <= voted[d];
    end
    assign addr[d] = cnt[d];
  end
endmodule
