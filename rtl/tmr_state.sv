// tmr_state: a state register protected by feedback triple modular redundancy.
//
// The register is kept in three copies, one per redundancy domain. Each
// domain has its own voter that takes the majority of all three copies, and
// the domain's next-state logic works from that voted value. An upset that
// flips a bit of one copy is therefore outvoted at once and, because every
// copy reloads from logic fed by the voters, it is overwritten on the next
// clock edge: the circuit heals itself instead of carrying the error. This is
// the "circuit with feedback TMR" arrangement (logic, registers, then a voter
// in each domain whose output is fed back).
//
// With TMR = 0 only copy 0 exists and all three q outputs show it, which gives
// the unmitigated design with the same interface.
//
// Ports: d[i] - next state computed by domain i; q[i] - voted state seen by
// domain i. Synchronous, active-high reset to RST_VAL. One clock of latency
// from d to q, like a plain register.
module tmr_state #(
  parameter int unsigned  W       = 8,
  parameter bit           TMR     = 1'b1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d [3],
  output logic [W-1:0] q [3]
);
  if (TMR) begin : g_tmr
    logic [W-1:0] r [3];
    for (genvar i = 0; i < 3; i++) begin : g_copy
      always_ff @(posedge clk) begin
        if (rst) r[i] <= RST_VAL;
        else     r[i] <= d[i];
      end
      logic unused_mismatch;
      tmr_voter #(.W(W)) u_vote (
        .a(r[0]), .b(r[1]), .c(r[2]), .y(q[i]), .mismatch(unused_mismatch)
      );
    end
  end else begin : g_single
    logic [W-1:0] r0;
    always_ff @(posedge clk) begin
      if (rst) r0 <= RST_VAL;
      else     r0 <= d[0];
    end
    for (genvar i = 0; i < 3; i++) begin : g_fan
      assign q[i] = r0;
    end
  end
endmodule
