// array_multiplier_tb: exhaustive self-checking test of the 8 x 8-bit
// multiplier. All 65536 operand pairs are applied and the 16-bit product is
// compared with the simulator's own multiplication.
module array_multiplier_tb;
  localparam int unsigned W = 8;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  array_multiplier #(.W(W)) dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**W; i++) begin
      for (int j = 0; j < 2**W; j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
