// sum_register_tb: self-checking test of the 32-bit running-sum register.
// Drives random clr, en and d for 2000 cycles and compares q every cycle with
// a reference value kept by the testbench (clr -> 0, else en -> d, else hold).
// Also checks the asynchronous reset.
module sum_register_tb;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst_n, clr, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;
  int n_clr = 0, n_load = 0, n_hold = 0;

  sum_register #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; d = '0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    @(negedge clk);
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      clr = ($urandom % 8) == 0;
      en  = ($urandom % 3) != 0;
      d   = $urandom;
      if (clr)     begin model = '0; n_clr++;  end
      else if (en) begin model = d;  n_load++; end
      else                         n_hold++;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d clr=%b en=%b q=%h expected %h", i, clr, en, q, model);
      end
      @(negedge clk);
    end
    if (n_clr == 0 || n_load == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL not every mode exercised: clr=%0d load=%0d hold=%0d", n_clr, n_load, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
