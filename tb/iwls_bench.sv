// iwls_bench -- one benchmark-sized camouflaged scan architecture with its
// checker.
//
// Builds secure_scan_top with ten scan chains of CHAIN_LEN flip-flops and
// about 50% of the flip-flops camouflaged (every odd position of every
// chain; position 0 is never camouflaged), with a key that differs from
// pair to pair, taken from a fixed pseudo-random sequence seeded by SEED.
// scan_check_harness drives it and checks it against the chain-pair
// equations; the counts are passed up to the testbench.
module iwls_bench #(
  parameter int unsigned CHAIN_LEN = 10,
  parameter int unsigned SEED      = 1,
  parameter int unsigned ROUNDS    = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_crossed,
  output int   n_straight,
  output int   n_camo_ff
);
  localparam int unsigned NC = 10;
  localparam int unsigned NP = NC / 2;

  function automatic logic [NP-1:0][CHAIN_LEN-1:0] make_mask();
    logic [NP-1:0][CHAIN_LEN-1:0] m;
    for (int i = 0; i < NP; i++)
      for (int p = 0; p < CHAIN_LEN; p++) m[i][p] = (p % 2) == 1;
    return m;
  endfunction

  // 16-bit Galois LFSR (x^16 + x^14 + x^13 + x^11 + 1) for the key bits.
  function automatic logic [NP-1:0][CHAIN_LEN-1:0] make_key();
    logic [NP-1:0][CHAIN_LEN-1:0] k;
    logic [15:0] s;
    s = 16'(SEED * 40503 + 1);
    for (int i = 0; i < NP; i++)
      for (int p = 0; p < CHAIN_LEN; p++) begin
        s = s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
        k[i][p] = s[0] && ((p % 2) == 1);
      end
    return k;
  endfunction

  localparam logic [NP-1:0][CHAIN_LEN-1:0] MASK = make_mask();
  localparam logic [NP-1:0][CHAIN_LEN-1:0] KEY  = make_key();

  logic rst_n, scan_en;
  logic [NC-1:0] scan_in, scan_out;
  logic [NC-1:0][CHAIN_LEN-1:0] func_d, state_q;
  int n_shift, n_capture, n_reset_scan, n_functional;

  assign n_camo_ff = 2 * $countones(MASK);

  secure_scan_top #(
    .NUM_CHAINS(NC), .CHAIN_LEN(CHAIN_LEN), .CAMO_MASK(MASK), .CAMO_KEY(KEY)
  ) dut (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in),
    .scan_out(scan_out), .func_d(func_d), .state_q(state_q));

  scan_check_harness #(
    .NC(NC), .LEN(CHAIN_LEN), .ROUNDS(ROUNDS), .MASK(MASK), .KEY(KEY)
  ) h (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in),
    .scan_out(scan_out), .func_d(func_d), .state_q(state_q), .done(done),
    .checks(checks), .failures(failures), .n_shift(n_shift), .n_capture(n_capture),
    .n_crossed(n_crossed), .n_straight(n_straight), .n_reset_scan(n_reset_scan),
    .n_functional(n_functional));
endmodule
