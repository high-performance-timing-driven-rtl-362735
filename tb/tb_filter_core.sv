// tb_filter_core: tests of filter_core.
//
// 1. The five-sample word-serial example (window 5 x 1, one sample per
//    cycle) fed with 0, 25, 37, 12, 12: the one-counters must read 0, 3, 4,
//    1, 2 from the oldest to the newest sample (the second 12 ranks above the
//    first), and the address of each rank must follow.
// 2. Random streams with stalls through four configurations: 3 x 3 with two
//    samples per cycle (one padding row per column), 3 x 3 word-serial,
//    a plus-shaped 3 x 3 window with two samples per cycle, and 5 x 5 with
//    three samples per cycle, all against a direct reference ranking.
// The address latency of two enabled cycles is checked in every case.
module tb_filter_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c[4], f[4], s[4], t[4];
  bit d[4];

  core_check #(.WV(3), .WH(3), .NI(2), .NCOLS(300), .SEED(11)) u_c0 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .ties(t[0]), .done(d[0]));
  core_check #(.WV(3), .WH(3), .NI(1), .NCOLS(300), .SEED(12)) u_c1 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .ties(t[1]), .done(d[1]));
  core_check #(.WV(3), .WH(3), .NI(2), .WIN_MASK(9'b010_111_010), .NCOLS(300), .SEED(13)) u_c2 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .stalls(s[2]), .ties(t[2]), .done(d[2]));
  core_check #(.WV(5), .WH(5), .NI(3), .NCOLS(200), .SEED(14)) u_c3 (
    .clk, .rst_n, .checks(c[3]), .failures(f[3]), .stalls(s[3]), .ties(t[3]), .done(d[3]));

  // Word-serial example core
  logic          en1 = 0;
  logic [9:0]    v1 = '0;
  logic [2:0]    rank1 = '0;
  logic [2:0]    addr1;
  logic          hit1;
  filter_core #(.WV(5), .WH(1), .NI(1), .DW(10)) u_ws (
    .clk, .rst_n, .en(en1), .in_val(v1), .rank(rank1), .addr(addr1), .addr_hit(hit1));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int unsigned seq[5] = '{0, 25, 37, 12, 12};
    int unsigned cnt_exp[5] = '{0, 3, 4, 1, 2};   // oldest .. newest
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 5; k++) begin
      en1 = 1; v1 = 10'(seq[k]);
      @(negedge clk);
    end
    // one more enabled edge moves the counts of that window into stage 2
    en1 = 1; v1 = 10'd99;
    @(posedge clk); #1;
    en1 = 0;
    // position i holds the sample of age i
    for (int i = 0; i < 5; i++)
      check($sformatf("one-counter %0d", i), int'(u_ws.cnt[i]), int'(cnt_exp[4-i]));
    // every rank selects its position at the encoder input
    for (int r = 0; r < 5; r++) begin
      rank1 = 3'(r); #1;
      for (int i = 0; i < 5; i++)
        if (cnt_exp[4-i] == r) check($sformatf("encoder for rank %0d", r), int'(u_ws.addr_nxt), i);
    end
    // stalled: the address register must not move
    begin
      int held;
      held = int'(addr1);
      repeat (3) @(negedge clk);
      check("address held while stalled", int'(addr1), held);
    end
    // the next enabled edge registers the median (rank 2: the newer 12)
    rank1 = 3'd2; en1 = 1;
    @(posedge clk); #1;
    en1 = 0;
    check("registered address of the median", int'(addr1), 0);
    check("address hit", int'(hit1), 1);
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int k = 0; k < 4; k++) begin
      checks += c[k]; failures += f[k];
      if (s[k] == 0 || t[k] == 0) begin
        failures++;
        $display("FAIL config %0d saw %0d stalls and %0d ties", k, s[k], t[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
