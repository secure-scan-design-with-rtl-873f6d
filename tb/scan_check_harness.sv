// scan_check_harness -- stimulus and reference model for a camouflaged scan
// architecture, shared by the end-to-end and benchmark-size testbenches.
//
// It plays the tester and the combinational logic around secure_scan_top:
// it drives reset, scan enable, the scan-in pins and the functional data,
// watches the scan-out pins and the flip-flop outputs, and compares them
// with values computed only from the key through the chain-pair equations
// (a bit entering chain c ends at position p of chain c ^ X_p, X_p the
// parity of the pair's key bits 1..p; a bit captured at position j leaves on
// chain c ^ Y_j, Y_j the parity of key bits j+1..LEN-1). Each round is a
// load, a capture and an unload overlapped with the next load; between
// rounds it runs functional cycles and a reset followed by a scan-out. It
// counts every mechanism it exercised so the testbench can require each.
module scan_check_harness #(
  parameter int unsigned NC     = 2,
  parameter int unsigned LEN    = 5,
  parameter int unsigned ROUNDS = 20,
  parameter logic [NC/2-1:0][LEN-1:0] MASK = '0,
  parameter logic [NC/2-1:0][LEN-1:0] KEY  = '0
) (
  input  logic                    clk,
  output logic                    rst_n,
  output logic                    scan_en,
  output logic [NC-1:0]           scan_in,
  input  logic [NC-1:0]           scan_out,
  output logic [NC-1:0][LEN-1:0]  func_d,
  input  logic [NC-1:0][LEN-1:0]  state_q,
  output logic                    done,
  output int                      checks,
  output int                      failures,
  output int                      n_shift,      // shift cycles
  output int                      n_capture,    // capture cycles
  output int                      n_crossed,    // bits that took a crossed (key = 1) path and differed
  output int                      n_straight,   // camouflaged positions passed straight (key = 0)
  output int                      n_reset_scan, // reset followed by a scan-out
  output int                      n_functional  // functional-mode cycles checked
);

  function automatic logic x_in(int pair, int p);
    logic r = 1'b0;
    for (int j = 1; j <= p; j++) r ^= KEY[pair][j];
    return r;
  endfunction
  function automatic logic y_out(int pair, int j);
    logic r = 1'b0;
    for (int i = j + 1; i < LEN; i++) r ^= KEY[pair][i];
    return r;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // Random value for every flip-flop.
  task automatic rand_pattern(output logic [NC-1:0][LEN-1:0] pat);
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < LEN; p++) pat[c][p] = 1'($urandom);
  endtask

  logic [NC-1:0][LEN-1:0] load_pat, cap_pat;

  // Unload what was captured (cap_pat, or zeros after a reset) while the
  // next load pattern load_pat goes in; LEN shift cycles.
  task automatic shift_through(input logic [NC-1:0][LEN-1:0] out_pat, input bit check_out);
    scan_en = 1'b1;
    for (int t = 0; t < LEN; t++) begin
      int j = LEN - 1 - t;
      if (check_out)
        for (int c = 0; c < NC; c++) begin
          int pr = c / 2, o = c ^ 1;
          logic exp = y_out(pr, j) ? out_pat[o][j] : out_pat[c][j];
          check(scan_out[c], exp, $sformatf("unload chain %0d bit %0d", c, j));
        end
      for (int c = 0; c < NC; c++) scan_in[c] = load_pat[c][LEN-1-t];
      @(negedge clk);
      n_shift++;
    end
  endtask

  task automatic check_load();
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < LEN; p++) begin
        int pr = c / 2, o = c ^ 1;
        logic xp = x_in(pr, p);
        check(state_q[c][p], xp ? load_pat[o][p] : load_pat[c][p],
              $sformatf("load chain %0d pos %0d", c, p));
        if (MASK[pr][p] && !KEY[pr][p]) n_straight++;
        if (xp && load_pat[o][p] != load_pat[c][p]) n_crossed++;
      end
  endtask

  initial begin
    logic [NC-1:0][LEN-1:0] zeros;
    zeros = '0;
    done = 1'b0; checks = 0; failures = 0;
    n_shift = 0; n_capture = 0; n_crossed = 0; n_straight = 0;
    n_reset_scan = 0; n_functional = 0;
    rst_n = 1'b0; scan_en = 1'b1; scan_in = '0; func_d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Reset-and-scan: right after reset every chain must unload zeros.
    rand_pattern(load_pat);
    shift_through(zeros, 1'b1);
    n_reset_scan++;
    check_load();
    for (int r = 0; r < ROUNDS; r++) begin
      // Capture one functional response.
      rand_pattern(cap_pat);
      func_d = cap_pat;
      scan_en = 1'b0;
      @(negedge clk);
      n_capture++;
      check(state_q == cap_pat, 1'b1, "capture");
      // Unload it while loading the next pattern.
      rand_pattern(load_pat);
      shift_through(cap_pat, 1'b1);
      check_load();
      if (r % 4 == 3) begin
        // A few cycles in functional mode: every flip-flop follows func_d.
        scan_en = 1'b0;
        for (int f = 0; f < 3; f++) begin
          rand_pattern(cap_pat);
          func_d = cap_pat;
          @(negedge clk);
          n_functional++;
          check(state_q == cap_pat, 1'b1, "functional cycle");
        end
        // Reset, then scan out: zeros only, whatever the key.
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        rand_pattern(load_pat);
        shift_through(zeros, 1'b1);
        n_reset_scan++;
        check_load();
      end
    end
    done = 1'b1;
  end

endmodule
