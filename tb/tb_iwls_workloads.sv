// tb_iwls_workloads -- the camouflaged scan architecture at the sizes of
// the six benchmark circuits it was evaluated on.
//
// Each benchmark is stitched into ten scan chains with about 50% of its
// flip-flops camouflaged. Chain lengths are the flip-flop counts divided by
// ten and rounded up: usb_phy 98 -> 10, sasc 116 -> 12, des 190 -> 19,
// spi 229 -> 23, wb_conmax 818 -> 82, s38584 1380 -> 138 (a few flip-flops
// of padding where the count is not a multiple of ten). Every instance runs
// loads, captures, unloads, functional cycles and reset-then-scan-out and is
// checked against the chain-pair equations for its own key. The run fails
// if a camouflaged connection was never seen crossing or passing straight.
module tb_iwls_workloads;
  localparam int NB = 6;
  localparam int LENS [NB] = '{10, 12, 19, 23, 82, 138};
  localparam int FLOPS[NB] = '{98, 116, 190, 229, 818, 1380};

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic done [NB];
  int checks [NB], failures [NB], n_crossed [NB], n_straight [NB], n_camo [NB];
  int total_checks = 0, total_failures = 0;

  for (genvar b = 0; b < NB; b++) begin : g_bench
    iwls_bench #(.CHAIN_LEN(LENS[b]), .SEED(b + 1), .ROUNDS(4)) u (
      .clk(clk), .done(done[b]), .checks(checks[b]), .failures(failures[b]),
      .n_crossed(n_crossed[b]), .n_straight(n_straight[b]), .n_camo_ff(n_camo[b]));
  end

  task automatic report();
    for (int b = 0; b < NB; b++) begin
      total_checks += checks[b] + 2;
      total_failures += failures[b];
      if (n_crossed[b] == 0) begin
        total_failures++;
        $display("FAIL bench %0d: no crossed connection exercised", b);
      end
      if (n_straight[b] == 0) begin
        total_failures++;
        $display("FAIL bench %0d: no straight camouflaged connection exercised", b);
      end
      $display("bench %0d: %0d flip-flops in 10x%0d, %0d camouflaged (%0d%% of the real ones), checks=%0d failures=%0d crossed=%0d",
               b, 10 * LENS[b], LENS[b], n_camo[b], 100 * n_camo[b] / FLOPS[b],
               checks[b], failures[b], n_crossed[b]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
  endtask

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int b = 0; b < NB; b++) all_done &= done[b];
    end while (!all_done);
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
