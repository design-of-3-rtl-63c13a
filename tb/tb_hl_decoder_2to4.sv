// tb_hl_decoder_2to4: exhaustive self-checking test of the HL-gate 2-to-4
// decoder.
//
// For each of the four (a, b) patterns it checks that exactly one output is
// 1 and that it is the expected minterm (A'B', A'B, AB', AB in that order).
// A watchdog ends the run with a failure if it has not finished in time.
module tb_hl_decoder_2to4;

  logic       a, b;
  logic [3:0] m;
  int         checks   = 0;
  int         failures = 0;

  hl_decoder_2to4 dut (.a(a), .b(b), .m(m));

  // Expected m indexed by {a, b}.
  localparam logic [3:0] EXPECTED [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (m !== EXPECTED[i]) begin
        failures++;
        $display("FAIL a=%b b=%b: m=%b expected %b", a, b, m, EXPECTED[i]);
      end
      checks++;
      if (!$onehot(m)) begin
        failures++;
        $display("FAIL a=%b b=%b: m=%b is not one-hot", a, b, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
