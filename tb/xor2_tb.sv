// xor2_tb: exhaustive self-checking test of the two-input XOR gate.
// Drives all four input combinations, several times each, and compares y
// with the truth table written out as a constant.
module xor2_tb;
  logic a, b, y;
  int checks = 0, failures = 0;
  // Truth table indexed by {a, b}: 00->0, 01->1, 10->1, 11->0.
  localparam logic [3:0] TABLE = 4'b0110;

  xor2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v);
        #1;
        checks++;
        if (y !== TABLE[v]) begin
          failures++;
          $display("FAIL a=%b b=%b y=%b expected %b", a, b, y, TABLE[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
