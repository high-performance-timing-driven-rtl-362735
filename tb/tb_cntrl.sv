// tb_cntrl: window height 7, two samples per cycle (4 groups per column).
// Checks that a pixel is accepted at most every 4 clocks and exactly every
// 4 clocks when offered continuously, that every accepted pixel produces 4
// step cycles with groups 0..3 and col_last on group 3, that out_valid
// pulses once per pixel with the sync words in order, and that in
// continuous operation out_valid follows the acceptance by 8 clocks
// (4 groups, 2 core stages, address and delay-line registers).
module tb_cntrl;
  localparam int WV = 7, NI = 2, SYNC_W = 8, NGRP = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic              in_valid = 0, in_ready, accept, step, col_last, out_valid;
  logic [SYNC_W-1:0] sync_in = '0, sync_out;
  logic [1:0]        grp;
  int checks = 0, failures = 0, backpressure = 0, idle = 0;
  int cyc = 0, steps = 0, accepted = 0, outs = 0, last_acc = -100;
  int exp_grp = 0;
  int acc_cyc[$];
  logic [SYNC_W-1:0] sent[$];

  cntrl #(.WV(WV), .NI(NI), .SYNC_W(SYNC_W)) u_dut (
    .clk, .rst_n, .in_valid, .in_ready, .sync_in, .accept, .grp, .step, .col_last,
    .out_valid, .sync_out);

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL cycle %0d %s: %0d expected %0d", cyc, what, got, exp_v);
    end
  endtask

  // monitor
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready) backpressure++;
    if (!step) idle++;
    if (step) begin
      expect_eq("group", int'(grp), exp_grp);
      expect_eq("col_last", int'(col_last), int'(exp_grp == NGRP - 1));
      exp_grp = (exp_grp + 1) % NGRP;
      steps++;
    end
    if (accept) begin
      if (last_acc >= 0 && cyc - last_acc < NGRP) expect_eq("accept spacing", cyc - last_acc, NGRP);
      last_acc = cyc;
      accepted++;
      sent.push_back(sync_in);
      acc_cyc.push_back(cyc);
    end
    if (out_valid) begin
      logic [SYNC_W-1:0] s;
      int a;
      s = sent.pop_front();
      a = acc_cyc.pop_front();
      expect_eq("sync order", int'(sync_out), int'(s));
      if (phase_cont) expect_eq("latency", cyc - a, NGRP + 4);
      outs++;
    end
  end

  bit phase_cont = 1;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // continuous offer, then random offer; an offer is held until taken
    for (int k = 0; k < 500; k++) begin
      if (k == 200) phase_cont = 0;
      if (accept_seen) begin
        in_valid = phase_cont ? 1'b1 : ($urandom_range(2, 0) != 0);
        sync_in  = SYNC_W'($urandom);
      end
      @(negedge clk);
    end
    phase_cont = 0;
    in_valid = 1;
    repeat (20) @(negedge clk);
    while (!accept_seen) @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    expect_eq("steps per pixel", steps, accepted * NGRP);
    expect_eq("outputs in flight", accepted - outs, 1);
    if (backpressure == 0 || idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // remembers whether the offer of the last cycle was taken
  bit accept_seen = 1;
  always @(posedge clk) accept_seen <= accept || !in_valid;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
