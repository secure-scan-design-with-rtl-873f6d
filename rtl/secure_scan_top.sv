// secure_scan_top -- scan architecture protected by scan camouflaging.
//
// The state flip-flops of a circuit are stitched into NUM_CHAINS scan
// chains of CHAIN_LEN flip-flops. The chains are taken two by two
// (chains 2i and 2i+1 form pair i, see camo_chain_pair). At the camouflaged
// positions of a pair, both flip-flops carry a second, uncontacted scan pin
// wired to the other chain, so the layout shows two candidate scan paths per
// position and only the fixed key, which picks the version of each cell,
// decides which one is live. The functional behaviour is unchanged: with
// scan_en = 0 every flip-flop captures its functional input; only the
// order in which scan data travels through the chains is hidden.
//
// The combinational logic that the flip-flops feed and sample is not part
// of this module: its inputs are brought out as state_q and its outputs
// come in as func_d, indexed [chain][position].
//
// Parameters: NUM_CHAINS (even), CHAIN_LEN, and per pair i the masks
// CAMO_MASK[i] (which positions are camouflaged; bit 0 must be clear) and
// CAMO_KEY[i] (which version each camouflaged position uses). The defaults
// are the two-chain, five-flip-flop example with four camouflaged
// flip-flops per chain; the key value is this design's choice, since the
// key is a per-device secret.
//
// Timing: a full load or unload is CHAIN_LEN cycles with scan_en = 1,
// a capture is one cycle with scan_en = 0; asynchronous active-low reset.
module secure_scan_top #(
  parameter int unsigned NUM_CHAINS = 2,
  parameter int unsigned CHAIN_LEN  = 5,
  parameter logic [NUM_CHAINS/2-1:0][CHAIN_LEN-1:0] CAMO_MASK =
    {(NUM_CHAINS/2){CHAIN_LEN'({CHAIN_LEN{1'b1}} << 1)}},
  parameter logic [NUM_CHAINS/2-1:0][CHAIN_LEN-1:0] CAMO_KEY  =
    {(NUM_CHAINS/2){CHAIN_LEN'(5'b01010)}}
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                scan_en,
  input  logic [NUM_CHAINS-1:0]               scan_in,
  output logic [NUM_CHAINS-1:0]               scan_out,
  input  logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0] func_d,
  output logic [NUM_CHAINS-1:0][CHAIN_LEN-1:0] state_q
);

  localparam int unsigned NUM_PAIRS = NUM_CHAINS / 2;

  if (NUM_CHAINS < 2 || (NUM_CHAINS % 2) != 0) begin : g_chains_err
    $error("secure_scan_top: NUM_CHAINS must be even and at least 2");
  end

  for (genvar i = 0; i < NUM_PAIRS; i++) begin : g_pair
    camo_chain_pair #(
      .CHAIN_LEN(CHAIN_LEN),
      .CAMO_MASK(CAMO_MASK[i]),
      .CAMO_KEY (CAMO_KEY[i])
    ) u_pair (
      .clk     (clk),
      .rst_n   (rst_n),
      .se      (scan_en),
      .scan_in (scan_in[2*i +: 2]),
      .scan_out(scan_out[2*i +: 2]),
      .d       (func_d[2*i +: 2]),
      .q       (state_q[2*i +: 2])
    );
  end

endmodule
