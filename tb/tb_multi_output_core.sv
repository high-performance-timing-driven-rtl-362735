// tb_multi_output_core: random streams with stalls through the
// multiple-output core in three shapes: 3 x 3 with two samples per cycle
// (a 4-row kernel holding two 3 x 3 windows), 5 x 5 with four (an 8-row
// kernel, four windows) and 7 x 7 with three (a 9-row kernel, three
// windows). Every window's address is checked, two enabled cycles after its
// column completed, against a direct ranking of that window's pixels.
module tb_multi_output_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c[3], f[3], s[3], t[3];
  bit d[3];

  core_check #(.WV(3), .WH(3), .NI(2), .MULTI(1), .NCOLS(300), .SEED(31)) u_c0 (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .stalls(s[0]), .ties(t[0]), .done(d[0]));
  core_check #(.WV(5), .WH(5), .NI(4), .MULTI(1), .NCOLS(200), .SEED(32)) u_c1 (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .stalls(s[1]), .ties(t[1]), .done(d[1]));
  core_check #(.WV(7), .WH(7), .NI(3), .MULTI(1), .NCOLS(100), .SEED(33)) u_c2 (
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
