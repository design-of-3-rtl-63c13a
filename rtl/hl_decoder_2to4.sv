// hl_decoder_2to4: 2-to-4 decoder realised as a single 4x4 "HL" reversible
// gate.
//
// The HL gate takes the two select inputs A and B together with two constant
// inputs, 0 and 1, and produces all four minterms A'B', A'B, AB', AB with no
// garbage output (quantum cost 7 in the published comparison). Only this
// function, with the constants applied, is specified; the gate's behaviour
// for other values on its constant inputs is not, so the constants are fixed
// inside this module and are not ports. The sum-of-products below is the
// simplest logic with that function; it is this design's choice, not the
// gate's quantum-level structure.
//
// Interface: inputs a (more significant) and b; output m[3:0] with
// m[i] = 1 exactly when {a, b} = i, i.e. m[0] = A'B', m[1] = A'B,
// m[2] = AB', m[3] = AB. Exactly one bit of m is 1 for every input.
// Timing: purely combinational, no clock.
module hl_decoder_2to4 (
  input  logic       a,
  input  logic       b,
  output logic [3:0] m
);

  always_comb begin
    m[0] = ~a & ~b;  // A'B'
    m[1] = ~a &  b;  // A'B
    m[2] =  a & ~b;  // AB'
    m[3] =  a &  b;  // AB
  end

endmodule
