// tb_camo_chain_pair -- self-checking testbench for a camouflaged chain pair.
//
// Twenty copies of the pair run side by side on the same stimulus, each
// built with its own stitching: the sixteen key values of the five-long,
// four-camouflaged example (all k3..k0), and four keys of a pair with only
// positions 1 and 3 camouflaged. Each round shifts two random five-bit
// patterns a (into scan_in[0]) and c (into scan_in[1]) in, most significant
// bit first, checks every flip-flop against the load equations
//   a'_p = a_p when X_p = 0, c_p when X_p = 1,  X_p = k(1) ^ .. ^ k(p)
// (and the mirror for chain 1), captures random functional data b', d' with
// se = 0, then unloads for CHAIN_LEN cycles while checking scan_out against
// the unload equations
//   b_j = b'_j when Y_j = 0, d'_j when Y_j = 1,  Y_j = k(j+1) ^ .. ^ k(LEN-1).
// The expected values come from these equations alone, not from the
// stitching. A load must complete in exactly CHAIN_LEN shift cycles.
module tb_camo_chain_pair;
  localparam int LEN  = 5;
  localparam int NDUT = 20;

  function automatic logic [LEN-1:0] mask_of(int k);
    return (k < 16) ? 5'b11110 : 5'b01010;
  endfunction
  function automatic logic [LEN-1:0] key_of(int k);
    logic [LEN-1:0] r;
    if (k < 16) r = LEN'(k << 1);
    else        r = LEN'({k[1], 1'b0, k[0], 1'b0});
    return r;
  endfunction

  logic clk;
  initial clk = 1'b0;
  logic rst_n, se;
  logic [1:0]          scan_in;
  logic [1:0][LEN-1:0] d;
  logic [1:0]          so [NDUT];
  logic [1:0][LEN-1:0] q  [NDUT];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NDUT; k++) begin : g_dut
    camo_chain_pair #(
      .CHAIN_LEN(LEN),
      .CAMO_MASK(mask_of(k)),
      .CAMO_KEY (key_of(k))
    ) dut (
      .clk(clk), .rst_n(rst_n), .se(se), .scan_in(scan_in),
      .scan_out(so[k]), .d(d), .q(q[k]));
  end

  always #5 clk = ~clk;

  // Prefix parity of the key: number of crossings a bit meets on its way in.
  function automatic logic x_in(logic [LEN-1:0] key, int p);
    logic r = 1'b0;
    for (int j = 1; j <= p; j++) r ^= key[j];
    return r;
  endfunction
  // Suffix parity: crossings a bit meets on its way out from position j.
  function automatic logic y_out(logic [LEN-1:0] key, int j);
    logic r = 1'b0;
    for (int i = j + 1; i < LEN; i++) r ^= key[i];
    return r;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic [LEN-1:0] a, c, bp, dp;
    int cycles;
    rst_n = 1'b0; se = 1'b1; scan_in = '0; d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 60; round++) begin
      a = LEN'($urandom); c = LEN'($urandom);
      // Load: LEN shift cycles, a_{LEN-1} first, a_0 last.
      se = 1'b1;
      cycles = 0;
      for (int t = 0; t < LEN; t++) begin
        scan_in = {c[LEN-1-t], a[LEN-1-t]};
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != LEN) begin
        failures++;
        $display("FAIL load took %0d cycles", cycles);
      end
      for (int k = 0; k < NDUT; k++)
        for (int p = 0; p < LEN; p++) begin
          check(q[k][0][p], x_in(key_of(k), p) ? c[p] : a[p], $sformatf("dut %0d load chain0 pos %0d", k, p));
          check(q[k][1][p], x_in(key_of(k), p) ? a[p] : c[p], $sformatf("dut %0d load chain1 pos %0d", k, p));
        end
      // Capture: one functional cycle.
      bp = LEN'($urandom); dp = LEN'($urandom);
      d = {dp, bp};
      se = 1'b0;
      @(negedge clk);
      for (int k = 0; k < NDUT; k++) begin
        check(q[k][0] == bp, 1'b1, $sformatf("dut %0d capture chain0", k));
        check(q[k][1] == dp, 1'b1, $sformatf("dut %0d capture chain1", k));
      end
      // Unload: b_{LEN-1} is visible first, b_j after LEN-1-j shifts.
      se = 1'b1;
      for (int j = LEN - 1; j >= 0; j--) begin
        for (int k = 0; k < NDUT; k++) begin
          check(so[k][0], y_out(key_of(k), j) ? dp[j] : bp[j], $sformatf("dut %0d unload so0 bit %0d", k, j));
          check(so[k][1], y_out(key_of(k), j) ? bp[j] : dp[j], $sformatf("dut %0d unload so1 bit %0d", k, j));
        end
        scan_in = 2'($urandom);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
