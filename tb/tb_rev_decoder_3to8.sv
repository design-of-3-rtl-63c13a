// tb_rev_decoder_3to8: end-to-end self-checking test of the reversible
// 3-to-8 decoder at its only configuration.
//
// Phase 1 walks all eight {a, b, c} codes and checks that y is one-hot with
// the 1 at index {a, b, c}, that the garbage output equals c, and that the
// input code can be recovered from (y, garbage), i.e. the whole output
// vector is one-to-one. Phase 2 applies a few hundred random codes in random
// order and checks the same rules, showing that the circuit keeps no state.
// It counts how often each mechanism of the design was exercised: every one
// of the four R gates routing its minterm to its Q output (select C = 1) and
// to its R output (C = 0), and the select bit C reaching the end of the
// chain with each value. A mechanism that never happened counts as a
// failure. A watchdog ends the run with a failure if it has not finished.
module tb_rev_decoder_3to8;

  logic       a, b, c;
  logic [7:0] y;
  logic       garbage;
  int         checks   = 0;
  int         failures = 0;

  // Per R gate (1..4): times its minterm went out on Q and on R.
  int split_q [1:4];
  int split_r [1:4];
  // Times the chained select bit left the last gate as 0 and as 1.
  int chain_end [2];

  rev_decoder_3to8 dut (.a(a), .b(b), .c(c), .y(y), .garbage(garbage));

  // Which R gate serves the 2-bit minterm {a, b}: AB' -> 1, A'B -> 2,
  // AB -> 3, A'B' -> 4 (indexed by {a, b}).
  localparam int GATE_OF [4] = '{4, 2, 1, 3};

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check(input logic [2:0] code);
    logic [7:0] expected;
    logic [2:0] recovered;
    int         hits;
    {a, b, c} = code;
    #1;
    expected = 8'b1 << code;
    checks++;
    if (y !== expected) begin
      failures++;
      $display("FAIL code=%b: y=%b expected %b", code, y, expected);
    end
    checks++;
    if (garbage !== code[0]) begin
      failures++;
      $display("FAIL code=%b: garbage=%b expected %b", code, garbage, code[0]);
    end
    // Invert the decoder: position of the single 1 in y.
    recovered = '0;
    hits = 0;
    for (int k = 0; k < 8; k++) begin
      if (y[k]) begin
        recovered = 3'(k);
        hits++;
      end
    end
    checks++;
    if (hits != 1 || recovered != code || garbage != recovered[0]) begin
      failures++;
      $display("FAIL code=%b: cannot recover input from y=%b garbage=%b", code, y, garbage);
    end
    // Mechanism counters, read from the outputs.
    if (y[{code[2:1], 1'b1}]) split_q[GATE_OF[code[2:1]]]++;
    if (y[{code[2:1], 1'b0}]) split_r[GATE_OF[code[2:1]]]++;
    chain_end[garbage]++;
  endtask

  initial begin : stimulus
    for (int g = 1; g <= 4; g++) begin
      split_q[g] = 0;
      split_r[g] = 0;
    end
    chain_end[0] = 0;
    chain_end[1] = 0;

    // Phase 1: every code in order.
    for (int i = 0; i < 8; i++) apply_and_check(3'(i));

    // Phase 2: random codes.
    for (int i = 0; i < 400; i++) apply_and_check(3'($urandom_range(7, 0)));

    for (int g = 1; g <= 4; g++) begin
      $display("R gate %0d: minterm to Q (C=1) %0d times, to R (C=0) %0d times",
               g, split_q[g], split_r[g]);
      checks++;
      if (split_q[g] == 0 || split_r[g] == 0) begin
        failures++;
        $display("FAIL R gate %0d was not exercised both ways", g);
      end
    end
    $display("select C left the chain as 0 %0d times, as 1 %0d times",
             chain_end[0], chain_end[1]);
    checks++;
    if (chain_end[0] == 0 || chain_end[1] == 0) begin
      failures++;
      $display("FAIL select chain not exercised with both values");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
