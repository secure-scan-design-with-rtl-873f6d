// tb_scan_camo_ff -- self-checking testbench for the scan camouflaging
// flip-flop.
//
// Both versions of the cell are driven with the same random d, se and two
// independent random scan pins. After each rising edge, the version with
// REAL_PIN = 0 must have taken scan_in0 and the version with REAL_PIN = 1
// must have taken scan_in1 when se was 1 (the dummy pin must have no
// effect), and both must have taken d when se was 0. The reset and a
// watchdog are checked as in the plain scan cell testbench.
module tb_scan_camo_ff;
  logic clk;
  initial clk = 1'b0;
  logic rst_n, d, s0, s1, se, q_v0, q_v1;
  int   checks = 0, failures = 0;
  int   dummy_differs = 0;

  scan_camo_ff #(.REAL_PIN(1'b0)) dut_v0 (
    .clk(clk), .rst_n(rst_n), .d(d), .scan_in0(s0), .scan_in1(s1), .se(se), .q(q_v0));
  scan_camo_ff #(.REAL_PIN(1'b1)) dut_v1 (
    .clk(clk), .rst_n(rst_n), .d(d), .scan_in0(s0), .scan_in1(s1), .se(se), .q(q_v1));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic e0, e1;
    d = 1'b1; s0 = 1'b0; s1 = 1'b0; se = 1'b0; rst_n = 1'b1;
    @(posedge clk); #1 check(q_v0 & q_v1, 1'b1, "capture before reset");
    @(negedge clk); rst_n = 1'b0; #1 check(q_v0 | q_v1, 1'b0, "asynchronous reset");
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d  = 1'($urandom);
      s0 = 1'($urandom);
      s1 = 1'($urandom);
      se = 1'($urandom);
      if (se && s0 != s1) dummy_differs++;
      e0 = se ? s0 : d;
      e1 = se ? s1 : d;
      @(posedge clk); #1;
      check(q_v0, e0, "version 0 (SI on pin 0)");
      check(q_v1, e1, "version 1 (SI on pin 1)");
    end
    // The test only means something if the dummy pin disagreed with the
    // real one during shifts.
    checks++;
    if (dummy_differs == 0) begin
      failures++;
      $display("FAIL dummy pin never differed from the real pin");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
