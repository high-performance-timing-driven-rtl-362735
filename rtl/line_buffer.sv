// line_buffer: line memory and column read-out.
//
// Holds the last WV-1 lines of the input image so that, for every accepted
// pixel, the full WV-pixel column ending at that pixel is available. Line
// memory l (0 = previous line) is addressed by the horizontal position x; on
// an accepted pixel all memories are read at x and then shifted down one
// line, and the new pixel goes into memory 0. Each memory is read in the
// accepting cycle and written from its registered read data one clock later,
// so every line maps onto a plain one-read one-write RAM. The column is
// made of these registered reads and the registered pixel: row 0 is the oldest line (top of the window), row
// WV-1 the current pixel. Rows WV .. WVV-1 are padding (zero) so that the
// column is a whole number of NI-sample groups. With PAD_REAL set, the
// buffer keeps WVV-1 lines instead and the extra rows hold real pixels, as
// the multiple-output core needs (then row WVV-1 is the current pixel).
//
// The core takes NI samples per cycle, so the column is handed out one group
// at a time: lane[j] = column row grp*NI + j. The column register changes
// only when a pixel is accepted.
//
// Interface: accept/pix_in from the controller, grp selects the group.
// Latency: the column of a pixel accepted in cycle t is readable from t+1.
// The horizontal position wraps after LINE_W accepted pixels; lines are not
// otherwise delimited. Keeping WV-1 lines follows the document; the
// memory organisation, padding value and group read-out are this design's.
module line_buffer
  import rank_pkg::*;
#(
  parameter int unsigned LINE_W = 1920,
  parameter int unsigned WV     = 7,
  parameter int unsigned NI     = 2,
  parameter bit          PAD_REAL = 1'b0,
  localparam int unsigned WVV   = ((WV + NI - 1) / NI) * NI,
  localparam int unsigned NROW  = PAD_REAL ? WVV : WV,
  localparam int unsigned NGRP  = WVV / NI,
  localparam int unsigned X_W   = $clog2(LINE_W),
  localparam int unsigned G_W   = (NGRP > 1) ? $clog2(NGRP) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           accept,
  input  rgb_t           pix_in,
  input  logic [G_W-1:0] grp,
  output rgb_t [NI-1:0]  lane
);

  rgb_t [WVV-1:0]  col;
  rgb_t [NROW-2:0] rd;       // line l read at x, l = 0 the previous line
  logic [X_W-1:0]  x, x_w;
  rgb_t            pix_w;
  logic            wr_pend;

  // One simple dual-port memory per stored line. The line shift is written
  // one clock after the read, from the registered read data.
  for (genvar l = 0; l < NROW - 1; l++) begin : g_line
    rgb_t mem [LINE_W];
    always_ff @(posedge clk) begin
      if (accept) rd[l] <= mem[x];
      if (wr_pend) mem[x_w] <= (l == 0) ? pix_w : rd[(l == 0) ? 0 : l - 1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x       <= '0;
      x_w     <= '0;
      pix_w   <= '0;
      wr_pend <= 1'b0;
    end else begin
      wr_pend <= accept;
      if (accept) begin
        x_w   <= x;
        pix_w <= pix_in;
        x     <= (32'(x) == LINE_W - 1) ? '0 : x + 1'b1;
      end
    end
  end

  // Column rows: 0 = oldest line ... WV-1 = the current pixel, then padding.
  always_comb begin
    for (int r = 0; r < WVV; r++) begin
      if (r == NROW - 1) col[r] = pix_w;
      else if (r < NROW) col[r] = rd[NROW-2-r];
      else               col[r] = '0;
    end
  end

  always_comb begin
    for (int j = 0; j < NI; j++)
      lane[j] = col[32'(grp) * NI + j];
  end

endmodule
