// conv_mac_image_tb: a complete 2-D convolution layer pass through the
// multiply-accumulate engine, at its default widths.
//
// The testbench plays the controller that the engine expects around it. It
// generates a 16 x 16 image of 8-bit pixels and an 8-bit kernel, then for
// every output position of a stride-1 "valid" convolution it clears the sum,
// feeds the k*k (pixel, coefficient) pairs one per clock and reads the sum,
// which it compares with the same dot product computed directly. This is
// done for a 3x3 kernel (14 x 14 outputs) and a 5x5 kernel (12 x 12
// outputs). It also checks the cost of one output: 1 clear cycle plus k*k
// accumulation cycles.
module conv_mac_image_tb;
  import conv_mac_pkg::*;

  localparam int IMG = 16;

  logic     clk = 1'b0;
  logic     rst_n, clr, en;
  operand_t in_a, in_b;
  product_t product;
  acc_t     sum;

  operand_t image  [IMG][IMG];
  operand_t kernel [5][5];

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  conv_mac dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
    .in_a(in_a), .in_b(in_b), .product(product), .sum(sum)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One full convolution pass with a k x k kernel.
  task automatic convolve(input int k);
    int outputs = 0;
    for (int r = 0; r + k <= IMG; r++) begin
      for (int c = 0; c + k <= IMG; c++) begin
        longint unsigned ref_sum = 0;
        longint unsigned start = cycle;
        clr = 1'b1; en = 1'b0;
        @(negedge clk);
        clr = 1'b0; en = 1'b1;
        for (int i = 0; i < k; i++) begin
          for (int j = 0; j < k; j++) begin
            in_a = image[r+i][c+j];
            in_b = kernel[i][j];
            ref_sum += longint'(image[r+i][c+j]) * longint'(kernel[i][j]);
            @(negedge clk);
          end
        end
        en = 1'b0;
        checks++;
        if (sum != acc_t'(ref_sum)) begin
          failures++;
          $display("FAIL k=%0d out[%0d][%0d] = %0d, expected %0d", k, r, c, sum, ref_sum);
        end
        checks++;
        if (cycle - start != longint'(k * k + 1)) begin
          failures++;
          $display("FAIL k=%0d output took %0d cycles, expected %0d", k, cycle - start, k * k + 1);
        end
        outputs++;
      end
    end
    $display("k=%0d: %0d outputs computed", k, outputs);
  endtask

  initial begin
    foreach (image[r, c]) image[r][c] = operand_t'($urandom);
    foreach (kernel[i, j]) kernel[i][j] = operand_t'($urandom);
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; in_a = '0; in_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    convolve(3);
    convolve(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
