// filter_harness: end-to-end driver and checker for rank_filter_top.
//
// Streams a random NLINES x LINE_W image into the filter and checks every
// output pixel whose window lies wholly in the image against a reference
// computed here: the window around stream position n takes, for column age
// a and row r, the pixel at n - a - (WV-1-r)*LINE_W; samples are ranked by
// R+G+B, equal values ordered by age (older counts as smaller), and the
// pixel of the requested rank is expected (for the weighted filter: the one
// whose weight of smaller samples is closest to the rank). Half the pixels
// come from a small palette so equal magnitudes with different colours are
// frequent. Pixels are offered with random gaps (GAPS) or back to back;
// offered pixels are held until accepted.
//
// Besides the pixel check it verifies the sync word of every output, that
// every pixel but the last produces an output, and that with back-to-back
// offers a pixel is accepted exactly every ceil(WV/NI) clocks. It counts
// the mechanisms the design has: back-pressure, idle core cycles, columns
// with padding rows, equal magnitudes in a window and line wraps. With
// DEFAULTS set, the filter is instantiated with its own defaults, which this
// harness's parameter defaults repeat. With SUM_RGB clear the magnitude
// is the first component alone. With MULTI_OUT every output k is
// checked against window rows k .. k+WV-1 of the real-pixel column.
module filter_harness
  import rank_pkg::*;
#(
  parameter bit                    DEFAULTS    = 1'b0,
  parameter int unsigned           LINE_W      = 1920,
  parameter int unsigned           WV          = 7,
  parameter int unsigned           WH          = 7,
  parameter int unsigned           NI          = 2,
  parameter logic [WV*WH-1:0]      WIN_MASK    = '1,
  parameter bit                    USE_WEIGHTS = 1'b0,
  parameter int unsigned           WT_W        = 4,
  parameter logic [WV*WH*WT_W-1:0] WEIGHTS     = {(WV*WH){WT_W'(1)}},
  parameter bit                    MULTI_OUT   = 1'b0,
  parameter bit                    SUM_RGB     = 1'b1,
  parameter int unsigned           NLINES      = 10,
  parameter int unsigned           RANK        = 24,
  parameter bit                    GAPS        = 1'b1,
  parameter int unsigned           SEED        = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_backpressure,
  output int   n_idle,
  output int   n_padded,
  output int   n_ties,
  output int   n_wraps,
  output bit   done
);
  localparam int unsigned SYNC_W = 3;
  localparam int unsigned WVV    = ((WV + NI - 1) / NI) * NI;
  localparam int unsigned NGRP   = WVV / NI;
  localparam int unsigned TAPV   = WVV * WH;
  localparam int unsigned RANK_W = USE_WEIGHTS ? $clog2(WV * WH * ((1 << WT_W) - 1) + 1)
                                               : $clog2(TAPV + 1);
  localparam int unsigned NPIX   = NLINES * LINE_W;
  localparam int unsigned NOUT   = MULTI_OUT ? WVV - WV + 1 : 1;
  localparam int unsigned NROW   = MULTI_OUT ? WVV : WV;   // real rows in a column

  logic              in_valid, in_ready, out_valid;
  rgb_t              in_pix;
  rgb_t [NOUT-1:0]   out_pix;
  logic [SYNC_W-1:0] in_sync, out_sync;
  logic [RANK_W-1:0] rank;

  if (DEFAULTS) begin : g_dut
    rank_filter_top u_dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_pix, .in_sync, .rank,
      .out_valid, .out_pix, .out_sync);
  end else begin : g_dut
    rank_filter_top #(
      .LINE_W(LINE_W), .WV(WV), .WH(WH), .NI(NI), .SYNC_W(SYNC_W), .WIN_MASK(WIN_MASK),
      .USE_WEIGHTS(USE_WEIGHTS), .WT_W(WT_W), .WEIGHTS(WEIGHTS), .MULTI_OUT(MULTI_OUT),
      .SUM_RGB(SUM_RGB)
    ) u_dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_pix, .in_sync, .rank,
      .out_valid, .out_pix, .out_sync);
  end

  rgb_t        img[NPIX];
  int unsigned valid[TAPV], wgt[TAPV];
  int unsigned accepted, outs, last_acc, fast_spacing;

  function automatic int unsigned mag(rgb_t p);
    return SUM_RGB ? int'(p.r) + int'(p.g) + int'(p.b) : int'(p.r);
  endfunction

  // Expected output k for stream position n
  function automatic rgb_t expected(int unsigned n, int unsigned k, output bit tie);
    int unsigned w[TAPV];
    rgb_t        c[TAPV];
    int unsigned best, bestd;
    tie = 0;
    if (MULTI_OUT)
      for (int i = 0; i < TAPV; i++) begin
        int unsigned r;
        r = WVV - 1 - i % WVV;
        valid[i] = (r >= k && r < k + WV);
        wgt[i]   = valid[i];
      end
    for (int i = 0; i < TAPV; i++) begin
      int unsigned a, r;
      a = i / WVV; r = WVV - 1 - i % WVV;
      w[i] = 0; c[i] = '0;
      if (valid[i]) begin
        c[i] = img[n - a - (NROW - 1 - r) * LINE_W];
        w[i] = mag(c[i]);
      end
    end
    best = 0; bestd = 32'hffff_ffff;
    for (int i = 0; i < TAPV; i++) begin
      int unsigned cnt, dd;
      if (!valid[i]) continue;
      cnt = 0;
      for (int b = 0; b < TAPV; b++) begin
        if (b == i || !valid[b]) continue;
        if (w[b] == w[i]) tie = 1;
        if (w[b] < w[i] || (w[b] == w[i] && b > i)) cnt += wgt[b];
      end
      dd = (cnt > RANK) ? cnt - RANK : RANK - cnt;
      if (dd < bestd) begin bestd = dd; best = i; end
    end
    return c[best];
  endfunction

  initial begin
    rgb_t palette[4];
    int unsigned seed;
    seed = SEED;
    void'($urandom(seed));
    checks = 0; failures = 0; n_backpressure = 0; n_idle = 0; n_padded = 0;
    n_ties = 0; n_wraps = 0; done = 0;
    accepted = 0; outs = 0; fast_spacing = 0; last_acc = 0;
    for (int k = 0; k < 4; k++) palette[k] = rgb_t'($urandom);
    palette[1] = {palette[0].g, palette[0].r, palette[0].b};  // same magnitude, other colour
    for (int n = 0; n < NPIX; n++)
      img[n] = $urandom_range(1, 0) ? palette[$urandom_range(3, 0)] : rgb_t'($urandom);
    for (int i = 0; i < TAPV; i++) begin
      int unsigned r, col;
      r = WVV - 1 - i % WVV; col = WH - 1 - i / WVV;
      valid[i] = 0; wgt[i] = 0;
      if (r < WV) begin
        if (USE_WEIGHTS) wgt[i] = WEIGHTS[(col*WV + r)*WT_W +: WT_W];
        else             wgt[i] = WIN_MASK[col*WV + r];
        valid[i] = (wgt[i] != 0);
      end
    end
  end

  // Stimulus
  assign rank = RANK_W'(RANK);
  int unsigned next_pix;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      in_pix   <= '0;
      in_sync  <= '0;
      next_pix <= 0;
    end else if (!in_valid || in_ready) begin
      if (next_pix < NPIX && (!GAPS || $urandom_range(3, 0) != 0)) begin
        in_valid <= 1'b1;
        in_pix   <= img[next_pix];
        in_sync  <= SYNC_W'(next_pix);
        next_pix <= next_pix + 1;
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  // Monitor
  int unsigned cyc;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && !in_ready) n_backpressure++;
    if (!g_dut.u_dut.step) n_idle++;
    if (g_dut.u_dut.step && WVV > WV && g_dut.u_dut.u_cntrl.col_last) n_padded++;
    if (in_valid && in_ready) begin
      if (accepted > 0 && !GAPS) begin
        checks++;
        if (cyc - last_acc != NGRP) begin
          failures++;
          $display("FAIL pixel %0d accepted %0d clocks after the previous one", accepted, cyc - last_acc);
        end
      end
      if (accepted > 0 && accepted % LINE_W == 0) n_wraps++;
      last_acc = cyc;
      accepted++;
    end
    if (out_valid) begin
      if (outs >= (NROW - 1) * LINE_W + WH - 1) begin
        for (int k = 0; k < NOUT; k++) begin
          rgb_t e;
          bit   t;
          e = expected(outs, k, t);
          if (t) n_ties++;
          checks++;
          if (out_pix[k] !== e) begin
            failures++;
            if (failures < 10)
              $display("FAIL output %0d.%0d: %h expected %h", outs, k, out_pix[k], e);
          end
        end
      end
      checks++;
      if (out_sync !== SYNC_W'(outs)) begin
        failures++;
        if (failures < 10) $display("FAIL output %0d: sync %0d", outs, out_sync);
      end
      outs++;
    end
    if (!done && accepted == NPIX && outs == NPIX - 1 && !in_valid) begin
      repeat (20) @(posedge clk);
      checks++;
      if (outs != NPIX - 1) begin
        failures++;
        $display("FAIL %0d outputs for %0d pixels", outs, NPIX);
      end
      done = 1;
    end
  end

endmodule
