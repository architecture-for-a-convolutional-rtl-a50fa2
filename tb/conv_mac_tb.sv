// conv_mac_tb: end-to-end self-checking test of the multiply-accumulate engine
// at its default widths (8-bit operands, 32-bit running sum).
//
// Runs the engine the way a convolution controller would: clear the sum, feed
// the k*k (X, Y) pairs of one window, read the sum. It covers
//   - the 3x3 dot product of equation form S = sum X[i][j] * Y[i][j], with
//     random and with full-scale (255 * 255) operands;
//   - dynamic kernel size: windows of 1x1, 2x2, 3x3, 5x5, 7x7 and 11x11;
//   - idle cycles between pairs (en low: the sum must hold);
//   - clr raised together with en (clear wins);
//   - the asynchronous reset in the middle of a window;
//   - accumulator overflow: 66052 full-scale products wrap the 32-bit sum.
// Each result is compared with a dot product computed by the testbench. The
// latency is checked too: the sum must change at the very edge that accepts a
// pair, so a window of n pairs without idle cycles takes exactly n cycles.
// Every mechanism is counted, and one that never happened is a failure.
module conv_mac_tb;
  import conv_mac_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n, clr, en;
  operand_t in_a, in_b;
  product_t product;
  acc_t     sum;

  int checks = 0, failures = 0;
  int n_windows = 0, n_idle = 0, n_clr_en = 0, n_reset = 0, n_overflow = 0;
  int n_kernel_sizes = 0;
  longint unsigned cycle = 0;

  conv_mac dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
    .in_a(in_a), .in_b(in_b), .product(product), .sum(sum)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (sum=%0d) at cycle %0d", what, sum, cycle);
    end
  endtask

  // Clear the sum in one cycle.
  task automatic clear();
    @(negedge clk);
    clr = 1'b1; en = 1'b0;
    @(negedge clk);
    clr = 1'b0;
    check(sum == '0, "clear");
  endtask

  // Feed n pairs, with an idle cycle before a pair whenever idle_pct allows.
  // Checks the sum after every pair and the total cycle count.
  task automatic window(input int n, input int idle_pct, input bit full_scale);
    longint unsigned ref_sum = 0;
    longint unsigned start;
    int idles = 0;
    clear();
    start = cycle;
    for (int i = 0; i < n; i++) begin
      if (idle_pct > 0 && int'($urandom % 100) < idle_pct) begin
        en = 1'b0;
        in_a = operand_t'($urandom); in_b = operand_t'($urandom);
        @(negedge clk);
        check(sum == acc_t'(ref_sum), "hold while en low");
        idles++;
        n_idle++;
      end
      en = 1'b1;
      in_a = full_scale ? operand_t'(255) : operand_t'($urandom);
      in_b = full_scale ? operand_t'(255) : operand_t'($urandom);
      #1;
      check(product == product_t'(int'(in_a) * int'(in_b)), "product");
      ref_sum += longint'(in_a) * longint'(in_b);
      @(negedge clk);
      check(sum == acc_t'(ref_sum), "running sum after a pair");
    end
    en = 1'b0;
    check(cycle - start == longint'(n + idles), "one pair per clock");
    @(negedge clk);
    check(sum == acc_t'(ref_sum), "sum holds after the window");
    n_windows++;
  endtask

  initial begin
    int sizes[6] = '{1, 2, 3, 5, 7, 11};
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; in_a = '0; in_b = '0;
    repeat (2) @(negedge clk);
    check(sum == '0, "reset value");
    rst_n = 1'b1;

    // 3x3 windows: random and full-scale operands, back to back.
    for (int w = 0; w < 20; w++) window(9, 0, 1'b0);
    window(9, 0, 1'b1);
    check(sum == 32'd585225, "full-scale 3x3 window = 9 * 65025");

    // Dynamic kernel size, with idle cycles between pairs.
    foreach (sizes[s]) begin
      window(sizes[s] * sizes[s], 30, 1'b0);
      n_kernel_sizes++;
    end

    // clr and en together: the clear wins and the pair is dropped.
    window(4, 0, 1'b0);
    @(negedge clk);
    clr = 1'b1; en = 1'b1; in_a = 8'd200; in_b = 8'd100;
    @(negedge clk);
    clr = 1'b0; en = 1'b0;
    check(sum == '0, "clr has priority over en");
    n_clr_en++;

    // Reset in the middle of a window.
    @(negedge clk);
    en = 1'b1; in_a = 8'd17; in_b = 8'd3;
    @(negedge clk);
    en = 1'b0;
    check(sum == 32'd51, "single pair");
    #2 rst_n = 1'b0;
    #1 check(sum == '0, "asynchronous reset clears the sum");
    @(negedge clk);
    rst_n = 1'b1;
    n_reset++;

    // Overflow: the 32-bit sum holds at most 66051 full-scale products.
    begin
      longint unsigned ref_sum;
      clear();
      en = 1'b1; in_a = 8'd255; in_b = 8'd255;
      repeat (66051) @(negedge clk);
      ref_sum = 66051 * 65025;
      check(sum == acc_t'(ref_sum), "largest sum without overflow");
      check(ref_sum < 64'h1_0000_0000, "66051 products fit");
      @(negedge clk);
      en = 1'b0;
      ref_sum += 65025;
      check(ref_sum >= 64'h1_0000_0000, "66052 products overflow");
      check(sum == acc_t'(ref_sum), "sum wraps modulo 2^32");
      n_overflow++;
    end

    $display("windows=%0d kernel_sizes=%0d idle_cycles=%0d clr_with_en=%0d resets=%0d overflows=%0d",
             n_windows, n_kernel_sizes, n_idle, n_clr_en, n_reset, n_overflow);
    if (n_windows == 0 || n_kernel_sizes != 6 || n_idle == 0 || n_clr_en == 0 ||
        n_reset == 0 || n_overflow == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
