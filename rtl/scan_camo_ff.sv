// scan_camo_ff -- scan camouflaging flip-flop.
//
// A mux-D scan flip-flop with two scan input pins that look identical in
// the layout. Only one of them is contacted to the scan multiplexer inside
// the cell (the real SI); the other (the dummy DSI) sits on a dummy contact
// and reaches nothing. The cell comes in two versions that differ only in
// which of the two pin locations is the real one, set here by the parameter
// REAL_PIN. Scan stitching wires pin scan_in0 to the previous flip-flop of
// the cell's own chain and pin scan_in1 to a nearby flip-flop of another
// chain, so the version chosen for each cell decides the true scan path,
// while the wiring seen in the layout is the same for both versions.
//
// Interface: clk, asynchronous active-low reset rst_n, functional d, the two
// scan pins scan_in0 / scan_in1, scan enable se, output q.
// Timing: identical to scan_ff, one rising edge from input to q.
//
// The dummy pin is an input port that, by construction, drives nothing:
// tools report it as unused or as an open pin, and that is the point of the
// cell, not a wiring mistake. The two-version cell and the uncontacted pin
// follow the camouflaging scheme; the pin names, the REAL_PIN parameter and
// the reset are this design's choices.
module scan_camo_ff #(
  parameter bit REAL_PIN = 1'b0  // 0: scan_in0 is SI, scan_in1 is DSI; 1: swapped
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic scan_in0,
  input  logic scan_in1,
  input  logic se,
  output logic q
);

  logic si_contacted;

  // Only the contacted pin is routed into the cell; the other ends at the
  // dummy contact.
  if (REAL_PIN == 1'b0) begin : g_version0
    assign si_contacted = scan_in0;
  end else begin : g_version1
    assign si_contacted = scan_in1;
  end

  scan_ff u_ff (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (d),
    .si   (si_contacted),
    .se   (se),
    .q    (q)
  );

endmodule
