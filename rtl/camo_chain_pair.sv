// camo_chain_pair -- two scan chains joined by camouflaged scan connections.
//
// Two scan chains of CHAIN_LEN flip-flops each run side by side. Position 0
// of each chain is next to its scan-in pin and position CHAIN_LEN-1 drives
// its scan-out pin. At every position p whose bit is set in CAMO_MASK, both
// flip-flops of the pair are scan camouflaging flip-flops (scan_camo_ff):
// pin scan_in0 is wired to the previous flip-flop of the same chain and pin
// scan_in1 to the previous flip-flop of the other chain, so the layout shows
// a crossed pair of connections. The key bit CAMO_KEY[p] chooses the cell
// version for both flip-flops of the position: 0 keeps the straight
// connections real (the chains go on unchanged), 1 makes the crossed ones
// real (from position p on, the two chains swap their lower parts). Other
// positions are plain scan flip-flops. The key is fixed at manufacture;
// an attacker sees both connections and does not know which is live.
//
// With the four-position example (CHAIN_LEN = 5, positions 1..4 camouflaged)
// the key bits of the example are k0 = CAMO_KEY[1] .. k3 = CAMO_KEY[4]. A bit
// shifted in on scan-in c ends at position p of chain c XOR
// (CAMO_KEY[1] ^ .. ^ CAMO_KEY[p]); a bit captured at position p leaves on
// scan-out c XOR (CAMO_KEY[p+1] ^ .. ^ CAMO_KEY[CHAIN_LEN-1]).
//
// Interface: clk, rst_n, scan enable se, scan_in[1:0], scan_out[1:0], and
// for each chain c and position p the functional input d[c][p] (from the
// combinational logic) and state output q[c][p] (to it).
// Timing: loading or unloading a chain takes CHAIN_LEN shift cycles; a
// capture is one cycle with se = 0.
//
// The crossed-pair stitching, the two cell versions and the unmasked first
// position follow the scheme's example; pairing chains two by two and
// stitching the dummy pin to the same-position neighbour of the other chain
// are this design's way of choosing the "nearby" flip-flop.
module camo_chain_pair #(
  parameter int unsigned                CHAIN_LEN = 5,
  parameter logic [CHAIN_LEN-1:0]       CAMO_MASK = 5'b11110,
  parameter logic [CHAIN_LEN-1:0]       CAMO_KEY  = 5'b01010
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       se,
  input  logic [1:0]                 scan_in,
  output logic [1:0]                 scan_out,
  input  logic [1:0][CHAIN_LEN-1:0]  d,
  output logic [1:0][CHAIN_LEN-1:0]  q
);

  // Elaboration-time rules of the stitching.
  if (CHAIN_LEN < 2) begin : g_len_err
    $error("camo_chain_pair: CHAIN_LEN must be at least 2");
  end
  if (CAMO_MASK[0]) begin : g_mask_err
    $error("camo_chain_pair: position 0 takes the scan-in pin and cannot be camouflaged");
  end
  if ((CAMO_KEY & ~CAMO_MASK) != '0) begin : g_key_err
    $error("camo_chain_pair: CAMO_KEY may only set bits of camouflaged positions");
  end

  for (genvar c = 0; c < 2; c++) begin : g_chain
    for (genvar p = 0; p < CHAIN_LEN; p++) begin : g_pos
      if (p == 0) begin : g_head
        scan_ff u_ff (
          .clk  (clk),
          .rst_n(rst_n),
          .d    (d[c][p]),
          .si   (scan_in[c]),
          .se   (se),
          .q    (q[c][p])
        );
      end else if (CAMO_MASK[p]) begin : g_camo
        scan_camo_ff #(
          .REAL_PIN(CAMO_KEY[p])
        ) u_ff (
          .clk     (clk),
          .rst_n   (rst_n),
          .d       (d[c][p]),
          .scan_in0(q[c][p-1]),
          .scan_in1(q[1-c][p-1]),
          .se      (se),
          .q       (q[c][p])
        );
      end else begin : g_plain
        scan_ff u_ff (
          .clk  (clk),
          .rst_n(rst_n),
          .d    (d[c][p]),
          .si   (q[c][p-1]),
          .se   (se),
          .q    (q[c][p])
        );
      end
    end
    assign scan_out[c] = q[c][CHAIN_LEN-1];
  end

endmodule
