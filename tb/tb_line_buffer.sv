// tb_line_buffer: a 5-pixel-wide image, window height 3, two samples per
// group (one padding row). Pixels are accepted back to back or with gaps;
// after each acceptance both groups of the column are read and compared
// with the pixels one and two lines above and the new pixel itself, and the
// padding row must read zero. A second instance keeps three lines and must
// fill the padding row with real pixels instead.
module tb_line_buffer;
  import rank_pkg::*;
  localparam int LINE_W = 5, WV = 3, NI = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic          accept = 0;
  rgb_t          pix_in = '0;
  logic          grp = 0;
  rgb_t [NI-1:0] lane;
  int checks = 0, failures = 0, gaps = 0;
  rgb_t img[$];

  rgb_t [NI-1:0] lane_r;

  line_buffer #(.LINE_W(LINE_W), .WV(WV), .NI(NI)) u_dut (.clk, .rst_n, .accept, .pix_in, .grp, .lane);
  // the same with real pixels in the padding row (three lines kept)
  line_buffer #(.LINE_W(LINE_W), .WV(WV), .NI(NI), .PAD_REAL(1)) u_dut_r (
    .clk, .rst_n, .accept, .pix_in, .grp, .lane(lane_r));

  task automatic expect_eq(string what, rgb_t got, rgb_t exp_p);
    checks++;
    if (got !== exp_p) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp_p);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      accept = 1;
      pix_in = rgb_t'($urandom);
      img.push_back(pix_in);
      @(negedge clk);
      accept = 0;
      if (n >= 2 * LINE_W) begin
        grp = 0; #1;
        expect_eq("row 0", lane[0], img[n - 2*LINE_W]);
        expect_eq("row 1", lane[1], img[n - LINE_W]);
        grp = 1; #1;
        expect_eq("row 2", lane[0], img[n]);
        expect_eq("padding", lane[1], '0);
      end
      if (n >= 3 * LINE_W) begin
        grp = 0; #1;
        expect_eq("real-padding row 0", lane_r[0], img[n - 3*LINE_W]);
        expect_eq("real-padding row 1", lane_r[1], img[n - 2*LINE_W]);
        grp = 1; #1;
        expect_eq("real-padding row 2", lane_r[0], img[n - LINE_W]);
        expect_eq("real-padding row 3", lane_r[1], img[n]);
      end
      if ($urandom_range(1, 0)) begin
        gaps++;
        repeat ($urandom_range(3, 1)) @(negedge clk);
      end
    end
    if (gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
