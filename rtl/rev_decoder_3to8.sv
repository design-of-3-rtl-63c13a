// rev_decoder_3to8: reversible 3-to-8 decoder built from one HL-gate 2-to-4
// decoder and a chain of four R gates.
//
// How it works: the HL gate decodes A and B into the four minterms A'B',
// A'B, AB', AB. Each minterm goes to the B input of its own R gate, whose C
// input is tied to 0 and whose A input carries the third select bit C. That
// R gate splits the minterm into (minterm & C) on Q and (minterm & ~C) on R.
// Its P output repeats C and feeds the A input of the next R gate, so C runs
// down the chain instead of fanning out. The P output of the last gate is
// left unused: it is the decoder's single garbage output.
//
// Gate order and wiring follow the published circuit: R gate 1 splits AB',
// gate 2 A'B, gate 3 AB, gate 4 A'B'. Cost figures of the published design:
// 5 gates (1 HL + 4 R), 6 constant inputs (0 and 1 on the HL gate, one 0 on
// each R gate), 1 garbage output, quantum cost 23.
//
// Interface: select inputs a (most significant), b, c; one-hot output y[7:0]
// with y[i] = 1 exactly when {a, b, c} = i; garbage = C as it leaves the
// last R gate (brought out so the whole reversible output vector can be
// observed). Output indexing with A as the most significant bit is this
// design's choice. Timing: purely combinational, no clock or reset.
module rev_decoder_3to8 (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic [7:0] y,
  output logic       garbage
);

  logic [3:0] m;       // 2-bit minterms, m[{a,b}]
  logic [4:0] c_chain; // select bit C entering R gate k (c_chain[k]) and leaving the last

  hl_decoder_2to4 u_hl (
    .a (a),
    .b (b),
    .m (m)
  );

  assign c_chain[0] = c;

  // R gate 1: AB' -> AB'C, AB'C'
  r_gate u_r1 (.a(c_chain[0]), .b(m[2]), .c(1'b0), .p(c_chain[1]), .q(y[5]), .r(y[4]));
  // R gate 2: A'B -> A'BC, A'BC'
  r_gate u_r2 (.a(c_chain[1]), .b(m[1]), .c(1'b0), .p(c_chain[2]), .q(y[3]), .r(y[2]));
  // R gate 3: AB -> ABC, ABC'
  r_gate u_r3 (.a(c_chain[2]), .b(m[3]), .c(1'b0), .p(c_chain[3]), .q(y[7]), .r(y[6]));
  // R gate 4: A'B' -> A'B'C, A'B'C'
  r_gate u_r4 (.a(c_chain[3]), .b(m[0]), .c(1'b0), .p(c_chain[4]), .q(y[1]), .r(y[0]));

  assign garbage = c_chain[4];

endmodule
