// tb_fvg: the filter value must be R+G+B for the extreme pixels and for
// random ones; a second instance without the generator must pass the first
// component through, scaled to 10 bits.
module tb_fvg;
  import rank_pkg::*;
  rgb_t pix;
  fv_t  fv;
  int   checks = 0, failures = 0;

  fv_t  fv_y;

  fvg u_dut (.pix, .fv);
  fvg #(.SUM_RGB(1'b0)) u_dut_y (.pix, .fv(fv_y));

  task automatic try(rgb_t p);
    int exp_v;
    pix = p;
    #1;
    exp_v = int'(p.r) + int'(p.g) + int'(p.b);
    checks++;
    if (int'(fv) != exp_v) begin
      failures++;
      $display("FAIL %h: fv %0d expected %0d", p, fv, exp_v);
    end
    checks++;
    if (int'(fv_y) != 4 * int'(p.r)) begin
      failures++;
      $display("FAIL %h: luma fv %0d expected %0d", p, fv_y, 4 * int'(p.r));
    end
  endtask

  initial begin
    try('0);
    try('1);
    try('{r: 8'd255, g: 8'd0, b: 8'd0});
    try('{r: 8'd0, g: 8'd0, b: 8'd255});
    try('{r: 8'd0, g: 8'd255, b: 8'd1});
    for (int k = 0; k < 2000; k++) try(rgb_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
