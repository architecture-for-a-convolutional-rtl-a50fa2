// full_adder_tb: exhaustive self-checking test of the one-bit adder cell.
// For all eight input combinations it checks {cout, s} against the count of
// input bits that are high.
module full_adder_tb;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, cin} = 3'(v);
      ones = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, s} !== 2'(ones)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b s=%b, expected %0d", a, b, cin, cout, s, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
