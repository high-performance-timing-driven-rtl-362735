// tb_rank_filter_top: end-to-end tests of rank_filter_top on 16-pixel-wide
// random images, in seven configurations run side by side:
//   7 x 7, 2 samples per clock, median, random gaps (the default core
//          shape on short lines)
//   7 x 7, 2 samples per clock, rank 40, back-to-back pixels (throughput:
//          one pixel every 4 clocks)
//   3 x 3, word-serial, minimum, random gaps
//   3 x 3 plus-shaped window, 2 samples per clock, median of its 5 pixels
//   3 x 3 weighted (centre 3, edges 2, corners 1), 2 samples per clock,
//          rank 7 of weights summing to 15
//   3 x 3, 2 samples per clock, multiple outputs: each 4-row column gives
//          the medians of two vertically overlapping 3 x 3 windows
//   5 x 5, 3 samples per clock, median, magnitude taken from the first
//          component alone (input with a luma component)
// Each configuration must show back-pressure, idle core cycles, equal
// magnitudes and line wraps; those with padding rows must show padding.
module tb_rank_filter_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 7;
  int checks = 0, failures = 0;
  int c[N], f[N], bp[N], idl[N], pad[N], tie[N], wr[N];
  bit d[N];
  localparam logic [35:0] W_CENTRE = {4'd1, 4'd2, 4'd1, 4'd2, 4'd3, 4'd2, 4'd1, 4'd2, 4'd1};

  filter_harness #(.LINE_W(16), .NLINES(12), .RANK(24), .GAPS(1), .SEED(1)) u_h0 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .n_backpressure(bp[0]), .n_idle(idl[0]),
    .n_padded(pad[0]), .n_ties(tie[0]), .n_wraps(wr[0]), .done(d[0]));
  filter_harness #(.LINE_W(16), .NLINES(12), .RANK(40), .GAPS(0), .SEED(2)) u_h1 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .n_backpressure(bp[1]), .n_idle(idl[1]),
    .n_padded(pad[1]), .n_ties(tie[1]), .n_wraps(wr[1]), .done(d[1]));
  filter_harness #(.LINE_W(16), .WV(3), .WH(3), .NI(1), .NLINES(12), .RANK(0), .GAPS(1), .SEED(3)) u_h2 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .n_backpressure(bp[2]), .n_idle(idl[2]),
    .n_padded(pad[2]), .n_ties(tie[2]), .n_wraps(wr[2]), .done(d[2]));
  filter_harness #(.LINE_W(16), .WV(3), .WH(3), .NI(2), .WIN_MASK(9'b010_111_010), .NLINES(12),
                   .RANK(2), .GAPS(1), .SEED(4)) u_h3 (
    .clk, .rst_n, .checks(c[3]), .failures(f[3]), .n_backpressure(bp[3]), .n_idle(idl[3]),
    .n_padded(pad[3]), .n_ties(tie[3]), .n_wraps(wr[3]), .done(d[3]));
  filter_harness #(.LINE_W(16), .WV(3), .WH(3), .NI(2), .USE_WEIGHTS(1), .WEIGHTS(W_CENTRE),
                   .NLINES(12), .RANK(7), .GAPS(1), .SEED(5)) u_h4 (
    .clk, .rst_n, .checks(c[4]), .failures(f[4]), .n_backpressure(bp[4]), .n_idle(idl[4]),
    .n_padded(pad[4]), .n_ties(tie[4]), .n_wraps(wr[4]), .done(d[4]));

  filter_harness #(.LINE_W(16), .WV(3), .WH(3), .NI(2), .MULTI_OUT(1), .NLINES(12), .RANK(4),
                   .GAPS(1), .SEED(6)) u_h5 (
    .clk, .rst_n, .checks(c[5]), .failures(f[5]), .n_backpressure(bp[5]), .n_idle(idl[5]),
    .n_padded(pad[5]), .n_ties(tie[5]), .n_wraps(wr[5]), .done(d[5]));

  filter_harness #(.LINE_W(16), .WV(5), .WH(5), .NI(3), .SUM_RGB(0), .NLINES(12), .RANK(12),
                   .GAPS(1), .SEED(8)) u_h6 (
    .clk, .rst_n, .checks(c[6]), .failures(f[6]), .n_backpressure(bp[6]), .n_idle(idl[6]),
    .n_padded(pad[6]), .n_ties(tie[6]), .n_wraps(wr[6]), .done(d[6]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5] && d[6]);
    for (int k = 0; k < N; k++) begin
      checks += c[k]; failures += f[k];
      $display("config %0d: checks %0d back-pressure %0d idle %0d padded columns %0d ties %0d wraps %0d",
               k, c[k], bp[k], idl[k], pad[k], tie[k], wr[k]);
      if (bp[k] == 0 || tie[k] == 0 || wr[k] == 0) failures++;
      if (k != 1 && idl[k] == 0) failures++;
      if (k != 2 && pad[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
