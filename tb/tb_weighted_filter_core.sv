// tb_weighted_filter_core: tests of weighted_filter_core.
//
// Random streams with stalls through three configurations, each checked
// against a direct reference (weighted count of the smaller samples, the
// position closest to the rank, lowest position on a draw):
//   3 x 3, one sample per cycle, centre-weighted (centre 3, edges 2,
//          corners 1);
//   3 x 3, two samples per cycle, irregular weights including a zero;
//   3 x 3, two samples per cycle, all weights 1 (plain rank filter).
// The address latency of two enabled cycles is checked throughout.
module tb_weighted_filter_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c[3], f[3], s[3], t[3];
  bit d[3];

  // weight of position (column c, row r) at bit (c*3 + r)*4
  localparam logic [35:0] W_CENTRE = {4'd1, 4'd2, 4'd1,  4'd2, 4'd3, 4'd2,  4'd1, 4'd2, 4'd1};
  localparam logic [35:0] W_ODD    = {4'd5, 4'd0, 4'd1,  4'd7, 4'd2, 4'd1,  4'd3, 4'd15, 4'd4};

  core_check #(.WV(3), .WH(3), .NI(1), .WEIGHTED(1), .WEIGHTS(W_CENTRE), .NCOLS(300), .SEED(21)) u_c0 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .ties(t[0]), .done(d[0]));
  core_check #(.WV(3), .WH(3), .NI(2), .WEIGHTED(1), .WEIGHTS(W_ODD), .NCOLS(300), .SEED(22)) u_c1 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .ties(t[1]), .done(d[1]));
  core_check #(.WV(3), .WH(3), .NI(2), .WEIGHTED(1), .NCOLS(300), .SEED(23)) u_c2 (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .stalls(s[2]), .ties(t[2]), .done(d[2]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  initial begin
    wait (d[0] && d[1] && d[2]);
    for (int k = 0; k < 3; k++) begin
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
