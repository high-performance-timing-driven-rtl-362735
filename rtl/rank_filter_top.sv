// rank_filter_top: two-dimensional rank filter for an RGB pixel stream.
//
// Each output pixel is the input pixel whose magnitude (R+G+B) has the
// requested rank among the pixels of a WV x WH window (rank 0 = minimum,
// the middle rank = median). Working on one magnitude and passing the
// original colour keeps every output colour one that exists in the input.
//
// Structure (line buffer, filter value generator, filter core, delay line,
// control unit):
//   pixel -> line_buffer -> NI colours per cycle -+-> fvg (x NI) -> core -> addr
//                                                 +-> delay_line <----------+
//                                                       -> out_pix
// The core runs ceil(WV/NI) clocks per pixel; one pixel can be accepted per
// ceil(WV/NI) clocks. With USE_WEIGHTS = 0 the core is filter_core (rank
// filter with optional non-rectangular WIN_MASK); with USE_WEIGHTS = 1 it is
// weighted_filter_core with the per-position WEIGHTS. With MULTI_OUT = 1
// (rank filter, rectangular window) the padding rows of each column carry
// the next image lines and multi_output_core ranks the NOUT = WVV-WV+1
// overlapping windows of the kernel at once: out_pix[k] is the result for
// the window whose bottom row is WVV-WV-k lines above the current one (so
// out_pix[NOUT-1] is the window ending at the current pixel).
// SUM_RGB = 0 is for input that already has a magnitude in its first
// component (Y of YCbCr): the generator then passes it through.
//
// Interface: in_valid/in_ready handshake with in_pix and a free sync word
// in_sync (for example hsync, vsync, data-enable); every accepted pixel
// produces one out_valid pulse carrying out_pix and that pixel's sync word.
// The output for the pixel at (x, y) is the window whose bottom-right pixel
// is (x, y); centring it is left to the sync path of the user. The line
// buffer does not know about frame edges, so windows at the left edge and in
// the first WV-1 lines contain pixels from elsewhere in the stream. rank is
// read when the core forms its address and should be held steady.
//
// Defaults: a 7 x 7 window with two new samples per clock on 1920-pixel
// lines, the configuration the document suggests for 1080p video on a
// Virtex-4. Latency: NGRP+2 core steps plus two clocks after a pixel's last
// group; results move only while later pixels keep the core stepping.
module rank_filter_top
  import rank_pkg::*;
#(
  parameter int unsigned           LINE_W      = 1920,
  parameter int unsigned           WV          = 7,
  parameter int unsigned           WH          = 7,
  parameter int unsigned           NI          = 2,
  parameter int unsigned           SYNC_W      = 3,
  parameter logic [WV*WH-1:0]      WIN_MASK    = '1,
  parameter bit                    USE_WEIGHTS = 1'b0,
  parameter int unsigned           WT_W        = 4,
  parameter logic [WV*WH*WT_W-1:0] WEIGHTS     = {(WV*WH){WT_W'(1)}},
  parameter bit                    MULTI_OUT   = 1'b0,
  parameter bit                    SUM_RGB     = 1'b1,
  localparam int unsigned          WVV    = ((WV + NI - 1) / NI) * NI,
  localparam int unsigned          NOUT   = MULTI_OUT ? WVV - WV + 1 : 1,
  localparam int unsigned          NGRP   = WVV / NI,
  localparam int unsigned          TAPV   = WVV * WH,
  localparam int unsigned          ADDR_W = $clog2(TAPV),
  localparam int unsigned          G_W    = (NGRP > 1) ? $clog2(NGRP) : 1,
  localparam int unsigned          RANK_W = USE_WEIGHTS
                                     ? $clog2(WV * WH * ((1 << WT_W) - 1) + 1)
                                     : $clog2(TAPV + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  rgb_t              in_pix,
  input  logic [SYNC_W-1:0] in_sync,
  input  logic [RANK_W-1:0] rank,
  output logic              out_valid,
  output rgb_t [NOUT-1:0]   out_pix,
  output logic [SYNC_W-1:0] out_sync
);

  logic                  accept, step;
  logic [G_W-1:0]        grp;
  rgb_t [NI-1:0]         lane;
  fv_t  [NI-1:0]         lane_fv;
  logic [NOUT-1:0][ADDR_W-1:0] addr;

  cntrl #(.WV(WV), .NI(NI), .SYNC_W(SYNC_W)) u_cntrl (
    .clk, .rst_n, .in_valid, .in_ready, .sync_in(in_sync), .accept, .grp,
    .step, .col_last(), .out_valid, .sync_out(out_sync)
  );

  line_buffer #(.LINE_W(LINE_W), .WV(WV), .NI(NI), .PAD_REAL(MULTI_OUT)) u_lb (
    .clk, .rst_n, .accept, .pix_in(in_pix), .grp, .lane
  );

  for (genvar j = 0; j < NI; j++) begin : g_fvg
    fvg #(.SUM_RGB(SUM_RGB)) u_fvg (.pix(lane[j]), .fv(lane_fv[j]));
  end

  if (MULTI_OUT) begin : g_core
    multi_output_core #(.WV(WV), .WH(WH), .NI(NI), .DW(FV_W)) u_core (
      .clk, .rst_n, .en(step), .in_val(lane_fv), .rank, .addr
    );
  end else if (USE_WEIGHTS) begin : g_core
    weighted_filter_core #(
      .WV(WV), .WH(WH), .NI(NI), .DW(FV_W), .WT_W(WT_W), .WEIGHTS(WEIGHTS)
    ) u_core (
      .clk, .rst_n, .en(step), .in_val(lane_fv), .rank, .addr
    );
  end else begin : g_core
    logic addr_hit;
    filter_core #(
      .WV(WV), .WH(WH), .NI(NI), .DW(FV_W), .WIN_MASK(WIN_MASK)
    ) u_core (
      .clk, .rst_n, .en(step), .in_val(lane_fv), .rank, .addr, .addr_hit
    );
  end

  delay_line #(.TAPV(TAPV), .NI(NI), .LAT(2), .NRD(NOUT)) u_dl (
    .clk, .rst_n, .en(step), .in_pix(lane), .addr, .out_pix
  );

endmodule
