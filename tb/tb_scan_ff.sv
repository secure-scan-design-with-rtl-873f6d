// tb_scan_ff -- self-checking testbench for the mux-D scan flip-flop.
//
// Drives random d, si and se for many cycles and checks after each rising
// edge that q holds si when se was 1 and d when se was 0, i.e. one cycle of
// latency. Also checks that the asynchronous reset clears q without a clock
// edge. A watchdog ends the run with a failure if it hangs.
module tb_scan_ff;
  logic clk;
  initial clk = 1'b0;
  logic rst_n, d, si, se, q;
  int   checks = 0, failures = 0;

  scan_ff dut (.clk(clk), .rst_n(rst_n), .d(d), .si(si), .se(se), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic exp_q;
    d = 1'b1; si = 1'b1; se = 1'b0; rst_n = 1'b1;
    // Asynchronous reset: set q to 1 first, then pull reset between edges.
    @(negedge clk); d = 1'b1; se = 1'b0;
    @(posedge clk); #1 check(q, 1'b1, "capture before reset");
    @(negedge clk); rst_n = 1'b0; #1 check(q, 1'b0, "asynchronous reset");
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      d  = 1'($urandom);
      si = 1'($urandom);
      se = 1'($urandom);
      exp_q = se ? si : d;
      @(posedge clk); #1;
      check(q, exp_q, se ? "shift" : "capture");
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
