// tb_table1_possibilities -- the eight scan paths of the two-chain example.
//
// In the example, chain 1 holds flip-flops A..E and chain 2 holds F..J, and
// positions 1..4 are camouflaged. The table below lists, for the eight
// combinations of which of the position pairs B/G, C/H and D/I exchange
// chains, the flip-flops whose content a tester actually loads through
// SI1 and SI2, in scan order. A combination corresponds to one key: with
// X_p = 1 when pair p is exchanged (X_0 = X_4 = 0), CAMO_KEY[p] =
// X_p ^ X_(p-1). The testbench builds the pair once per combination, loads
// a distinct 4-bit number for every flip-flop (one bit plane per load) and
// reads back, per flip-flop, which of the ten numbers arrived, so it
// identifies the flip-flop that each position of each chain reaches.
module tb_table1_possibilities;
  localparam int LEN = 5;
  localparam int NP  = 8;
  localparam string CHAIN1 [NP] = '{"ABCDE", "AGCDE", "ABHDE", "AGHDE",
                                    "ABCIE", "AGCIE", "ABHIE", "AGHIE"};
  localparam string CHAIN2 [NP] = '{"FGHIJ", "FBHIJ", "FGCIJ", "FBCIJ",
                                    "FGHDJ", "FBHDJ", "FGCDJ", "FBCDJ"};

  function automatic logic [LEN-1:0] key_of(int r);
    logic [LEN:0] x;
    logic [LEN-1:0] k;
    x = '0;
    x[1] = r[0]; x[2] = r[1]; x[3] = r[2];
    k = '0;
    for (int p = 1; p < LEN; p++) k[p] = x[p] ^ x[p-1];
    return k;
  endfunction

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, se;
  logic [1:0] scan_in;
  logic [1:0][LEN-1:0] d;
  logic [1:0] so [NP];
  logic [1:0][LEN-1:0] q [NP];
  int checks = 0, failures = 0;

  for (genvar r = 0; r < NP; r++) begin : g_dut
    camo_chain_pair #(.CHAIN_LEN(LEN), .CAMO_MASK(5'b11110), .CAMO_KEY(key_of(r))) dut (
      .clk(clk), .rst_n(rst_n), .se(se), .scan_in(scan_in), .scan_out(so[r]),
      .d(d), .q(q[r]));
  end

  initial begin
    logic [3:0] id [NP][2][LEN];
    rst_n = 1'b0; se = 1'b1; scan_in = '0; d = '0;
    @(negedge clk);
    rst_n = 1'b1;
    // Flip-flop number n = 5 * chain + position ('A' + n names it) is sent
    // towards chain c position p; four loads carry its four bits.
    for (int b = 0; b < 4; b++) begin
      for (int t = 0; t < LEN; t++) begin
        automatic int p = LEN - 1 - t;
        for (int c = 0; c < 2; c++) scan_in[c] = 1'((4'(5 * c + p)) >> b);
        @(negedge clk);
      end
      for (int r = 0; r < NP; r++)
        for (int c = 0; c < 2; c++)
          for (int p = 0; p < LEN; p++) id[r][c][p][b] = q[r][c][p];
    end
    // Position p of chain c received the number meant for flip-flop
    // CHAINc[p], i.e. that flip-flop's slot of the scan pattern.
    for (int r = 0; r < NP; r++)
      for (int p = 0; p < LEN; p++) begin
        automatic byte exp1 = byte'(CHAIN1[r][p]) - byte'("A");
        automatic byte exp2 = byte'(CHAIN2[r][p]) - byte'("A");
        checks += 2;
        if (id[r][0][p] != 4'(exp1)) begin
          failures++;
          $display("FAIL combination %0d chain 1 position %0d: reached %s", r + 1, p, CHAIN1[r]);
        end
        if (id[r][1][p] != 4'(exp2)) begin
          failures++;
          $display("FAIL combination %0d chain 2 position %0d: reached %s", r + 1, p, CHAIN2[r]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
