// tb_r_gate: exhaustive self-checking test of the R gate.
//
// Applies all eight (a, b, c) patterns and compares p, q, r with a truth
// table written out by hand: p follows a, q is 1 only for a = b = 1, and r
// is b when a = 0 and c when a = 1. It then checks that, with c held at 0 as
// in the decoder, the four (a, b) patterns give four different (p, q, r)
// vectors, i.e. the gate loses no information in the way it is used.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_r_gate;

  logic a, b, c;
  logic p, q, r;
  int   checks   = 0;
  int   failures = 0;

  r_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Expected {p, q, r} indexed by {a, b, c}.
  localparam logic [2:0] EXPECTED [8] = '{
    3'b000,  // a=0 b=0 c=0
    3'b000,  // a=0 b=0 c=1
    3'b001,  // a=0 b=1 c=0
    3'b001,  // a=0 b=1 c=1
    3'b100,  // a=1 b=0 c=0
    3'b101,  // a=1 b=0 c=1
    3'b110,  // a=1 b=1 c=0
    3'b111   // a=1 b=1 c=1
  };

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [2:0] seen [4];
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== EXPECTED[i]) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b: pqr=%b expected %b", a, b, c, {p, q, r}, EXPECTED[i]);
      end
    end

    // One-to-one on the inputs the decoder uses (c = 0).
    c = 1'b0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      seen[i] = {p, q, r};
      for (int j = 0; j < i; j++) begin
        checks++;
        if (seen[j] == seen[i]) begin
          failures++;
          $display("FAIL inputs %0d and %0d give the same output %b", j, i, seen[i]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
