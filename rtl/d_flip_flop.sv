// d_flip_flop: positive-edge D flip-flop with asynchronous active-low reset.
//
// q takes d at every rising edge of clk; while rst_n is low q is 0. One of
// these holds each bit of the running-sum register.
//
// Interface: clk, rst_n, d in; q out. Timing: q changes only after a rising
// clock edge (or at once when rst_n falls).
//
// The flip-flop as the storage element of the register follows the
// architecture, which builds it from NAND gates; here it is written as an
// edge-triggered process. The reset is this design's choice: the architecture
// calls for a register reset but does not describe one.
module d_flip_flop (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
