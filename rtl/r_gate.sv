// r_gate: the 3x3 "R" reversible gate used to split decoder minterms.
//
// Function (from the published gate definition):
//   P = A
//   Q = A & B
//   R = (~A & B) | (A & C)
// The two product terms of R can never be 1 together, so R is a 2:1
// multiplexer that selects B when A = 0 and C when A = 1.
//
// In the 3-to-8 decoder the gate is fed (A, B, C) = (select bit, 2-bit
// minterm, constant 0). It then gives Q = minterm & select and
// R = minterm & ~select, the two 3-bit minterms, while P hands the select
// bit on unchanged to the next gate in the chain. With C tied to 0 the
// mapping (A, B) -> (P, Q, R) is one-to-one; the printed equations do not
// make it one-to-one over all eight input patterns (for A = 0 the value of
// C is lost), and this module implements them as printed.
//
// Interface: three 1-bit inputs a, b, c and three 1-bit outputs p, q, r.
// Timing: purely combinational, no clock.
module r_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a & b;
    r = (~a & b) | (a & c);
  end

endmodule
