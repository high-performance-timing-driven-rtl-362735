// tb_rank_filter_full: rank_filter_top at its default size (1920-pixel
// lines, 7 x 7 window, two samples per clock, median of 49) filtering a
// 1920 x 16 strip of a random image offered with random gaps. Every output
// whose window lies in the strip is checked against the reference ranking,
// along with its sync word, the output count and, back to back, the
// acceptance rate of one pixel per four clocks.
module tb_rank_filter_full;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c, f, bp, idl, pad, tie, wr;
  bit d;

  filter_harness #(.DEFAULTS(1), .NLINES(16), .RANK(24), .GAPS(1), .SEED(7)) u_h (
    .clk, .rst_n, .checks(c), .failures(f), .n_backpressure(bp), .n_idle(idl),
    .n_padded(pad), .n_ties(tie), .n_wraps(wr), .done(d));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  initial begin
    wait (d);
    checks = c; failures = f;
    $display("checks %0d back-pressure %0d idle %0d padded columns %0d ties %0d wraps %0d",
             c, bp, idl, pad, tie, wr);
    if (bp == 0 || idl == 0 || pad == 0 || tie == 0 || wr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
