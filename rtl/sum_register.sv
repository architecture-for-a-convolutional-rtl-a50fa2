// sum_register: W-bit register (W = 32) that holds the running sum.
//
// A row of W d_flip_flop cells sharing one clock. In front of each flip-flop
// a small multiplexer chooses the next value: 0 when clr is high, d when en is
// high, otherwise the bit it already holds. clr has priority over en.
//
// Interface: clk, rst_n, clr, en, d (W bits) in; q (W bits) out.
// Timing: q changes one clock edge after clr or en is sampled high; it is 0
// at once while rst_n is low.
//
// The register of flip-flops that stores the sum and feeds it back follows
// the architecture. The clear (to start a new output value) and the enable
// (to let control logic pace the input pairs) are this design's choices; the
// architecture leaves reset and iteration control to logic it does not give.
module sum_register #(
  parameter int unsigned W = conv_mac_pkg::ACC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] nxt;

  always_comb begin
    if (clr)     nxt = '0;
    else if (en) nxt = d;
    else         nxt = q;
  end

  for (genvar i = 0; i < W; i++) begin : g_ff
    d_flip_flop u_ff (.clk(clk), .rst_n(rst_n), .d(nxt[i]), .q(q[i]));
  end

endmodule
