// tb_delay_line: random pixels are shifted in two at a time with random
// stalls while a random address is read; every output must be the pixel a
// separate shift-register model holds at address + LAT*NI just before the
// clock edge that registers it.
module tb_delay_line;
  import rank_pkg::*;
  localparam int TAPV = 12, NI = 2, LAT = 2, DEPTH = TAPV + LAT * NI;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic          en = 0;
  rgb_t [NI-1:0] in_pix = '0;
  logic [3:0]    addr = '0;
  rgb_t          out_pix;
  int checks = 0, failures = 0, stalls = 0;

  delay_line #(.TAPV(TAPV), .NI(NI), .LAT(LAT)) u_dut (.clk, .rst_n, .en, .in_pix, .addr, .out_pix);

  rgb_t model[DEPTH];

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      rgb_t exp_p;
      @(negedge clk);
      en     = ($urandom_range(3, 0) != 0);
      stalls += !en;
      in_pix = {rgb_t'($urandom), rgb_t'($urandom)};
      addr   = 4'($urandom_range(TAPV - 1, 0));
      exp_p  = model[addr + LAT * NI];
      @(posedge clk);
      if (en) begin
        for (int i = DEPTH - 1; i >= NI; i--) model[i] = model[i-NI];
        for (int j = 0; j < NI; j++) model[j] = in_pix[NI-1-j];
      end
      #1;
      if (k > 0) begin
        checks++;
        if (out_pix !== exp_p) begin
          failures++;
          $display("FAIL step %0d addr %0d: %h expected %h", k, addr, out_pix, exp_p);
        end
      end
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
