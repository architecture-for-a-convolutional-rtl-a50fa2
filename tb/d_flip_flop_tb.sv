// d_flip_flop_tb: self-checking test of the D flip-flop.
// Checks the asynchronous reset (q falls while the clock is idle), that q
// follows d only at rising edges, and 200 random d values one cycle apart.
module d_flip_flop_tb;
  logic clk = 1'b0, rst_n, d, q;
  int checks = 0, failures = 0;

  d_flip_flop dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic expect_q(input logic e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, e, $time);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    rst_n = 1'b1;
    d = 1'b1;
    @(posedge clk); #1;
    expect_q(1'b1, "load 1");
    rst_n = 1'b0;                        // asynchronous: no clock edge needed
    #1;
    expect_q(1'b0, "async reset");
    @(posedge clk); #1;
    expect_q(1'b0, "held in reset");
    rst_n = 1'b1;
    d = 1'b1;
    #2;
    expect_q(1'b0, "no change before edge");
    @(posedge clk); #1;
    expect_q(1'b1, "load after reset");
    d = 1'b0;
    @(negedge clk); #1;
    expect_q(1'b1, "falling edge ignored");
    for (int i = 0; i < 200; i++) begin
      prev = 1'($urandom);
      d = prev;
      @(posedge clk); #1;
      d = ~prev;                          // change d between edges
      expect_q(prev, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
