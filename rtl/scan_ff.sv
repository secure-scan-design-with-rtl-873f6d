// scan_ff -- conventional mux-D scan flip-flop.
//
// This is the ordinary scan cell that scan stitching inserts for every
// state bit of the circuit. In functional mode (se = 0) it captures the
// value the combinational logic drives on d; in shift mode (se = 1) it
// captures si, the Q output of the previous flip-flop of its scan chain
// (or the chain's scan-in pin for the first flip-flop). Flip-flops that are
// left as plain scan cells in the camouflaged design (the first flip-flop of
// every chain) use this cell, and the scan camouflaging flip-flop is built
// around it.
//
// Interface: clk, asynchronous active-low reset rst_n, d, si, se, q.
// Timing: q takes the selected input at the rising edge of clk; no other
// latency. The reset is a choice of this design (the scan cell's reset is
// not specified); it clears q to 0.
module scan_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,   // functional data from the combinational logic
  input  logic si,  // scan input
  input  logic se,  // scan enable: 1 = shift, 0 = capture
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= se ? si : d;
  end

endmodule
