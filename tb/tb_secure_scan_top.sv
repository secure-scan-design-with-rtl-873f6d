// tb_secure_scan_top -- end-to-end testbench of the camouflaged scan
// architecture at its default size.
//
// The top is built with all parameters at their defaults: two chains of
// five flip-flops, positions 1..4 camouflaged, key k3..k0 = 0101
// (CAMO_KEY = 5'b01010). The harness acts as tester and functional logic:
// it loads random patterns, captures random responses, unloads them, runs
// functional cycles and does reset-then-scan-out, checking every bit against
// the chain-pair equations for that key. Each mechanism (shift, capture,
// a bit crossing chains through a camouflaged cell, a camouflaged cell
// passing straight, reset-and-scan, functional mode) must occur at least
// once, or the run counts a failure.
module tb_secure_scan_top;
  localparam int unsigned NC  = 2;
  localparam int unsigned LEN = 5;
  localparam logic [0:0][LEN-1:0] KEY  = 5'b01010;
  localparam logic [0:0][LEN-1:0] MASK = 5'b11110;

  logic clk;
  initial clk = 1'b0;
  logic rst_n, scan_en, done;
  logic [NC-1:0] scan_in, scan_out;
  logic [NC-1:0][LEN-1:0] func_d, state_q;
  int checks, failures, n_shift, n_capture, n_crossed, n_straight, n_reset_scan, n_functional;
  int total_checks, total_failures;

  always #5 clk = ~clk;

  secure_scan_top dut (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in),
    .scan_out(scan_out), .func_d(func_d), .state_q(state_q));

  scan_check_harness #(.NC(NC), .LEN(LEN), .ROUNDS(40), .MASK(MASK), .KEY(KEY)) h (
    .clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in),
    .scan_out(scan_out), .func_d(func_d), .state_q(state_q), .done(done),
    .checks(checks), .failures(failures), .n_shift(n_shift), .n_capture(n_capture),
    .n_crossed(n_crossed), .n_straight(n_straight), .n_reset_scan(n_reset_scan),
    .n_functional(n_functional));

  task automatic require(input int count, input string what);
    total_checks++;
    if (count == 0) begin
      total_failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  task automatic report();
    total_checks += checks;
    total_failures += failures;
    require(n_shift, "scan shift");
    require(n_capture, "capture");
    require(n_crossed, "crossed camouflaged connection");
    require(n_straight, "straight camouflaged connection");
    require(n_reset_scan, "reset-and-scan");
    require(n_functional, "functional mode");
    $display("shift=%0d capture=%0d crossed=%0d straight=%0d reset_scan=%0d functional=%0d",
             n_shift, n_capture, n_crossed, n_straight, n_reset_scan, n_functional);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
  endtask

  initial begin
    total_checks = 0; total_failures = 0;
    total_checks++;
    if ($bits(state_q) != NC * LEN) total_failures++;
    wait (done);
    report();
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    total_failures++;
    $display("FAIL watchdog expired");
    report();
    $finish;
  end
endmodule
