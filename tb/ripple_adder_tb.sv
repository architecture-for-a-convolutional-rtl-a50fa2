// ripple_adder_tb: self-checking test of the 32-bit ripple-carry adder.
// Checks corner cases (zero, all ones, a carry that ripples through all 32
// bits) and 20000 random operand pairs against a 33-bit sum computed with the
// simulator's own arithmetic.
module ripple_adder_tb;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ripple_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] expected;
    a = ta; b = tb_; cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, s} !== expected) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h, expected %h", ta, tb_, tc, cout, s, expected);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 1'b0);
    check('1, '0, 1'b1);            // carry ripples through every bit
    check('1, '1, 1'b1);
    check(32'h7fff_ffff, 32'h1, 1'b0);
    check(32'hffff_0000, 32'h0001_0000, 1'b0);
    for (int i = 0; i < 20000; i++)
      check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
