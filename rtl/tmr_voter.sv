// tmr_voter: bitwise 2-of-3 majority voter.
//
// Each output bit is 1 when at least two of the three input bits are 1, so a
// single corrupted copy is outvoted. This is the "V" element of triple modular
// redundancy: it sits after triplicated logic and hides an upset in any one
// copy. Purely combinational, no latency.
//
// Ports: a, b, c - the three copies; y - the voted value; mismatch - 1 when
// the copies do not all agree (a diagnostic, not needed for the voting).
module tmr_voter #(
  parameter int unsigned W = 8
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
