// cntrl: control unit of the rank filter.
//
// Sequencing: a pixel is accepted when in_valid and in_ready are both high.
// Its column is then fed to the filter core in NGRP = ceil(WV/NI) groups of
// NI samples, one group per clock; step is high in those cycles and is the
// clock enable of the core, the filter value path and the delay line.
// in_ready is high when no column is in flight or the last group is being
// sent, so back-to-back pixels keep the core busy every cycle and the core
// runs at NGRP times the pixel rate (the document's FO = FS*WV/NI, with WV/NI
// rounded up). col_last marks the group that completes a column.
//
// Delayed signals: the sync word captured with each pixel travels with the
// column-complete mark through two enabled stages, matching the core's two
// stages from its comparison registers to its address, then through two
// plain registers matching the address register being read and the delay
// line's output register. out_valid is a one-cycle pulse per accepted pixel,
// aligned with the filtered pixel on the delay line output. Because the
// pipeline moves only with step, a pixel's result leaves once enough later
// pixels have pushed it through (at most NGRP+2 further steps).
//
// The document gives the unit's role (delayed sync and output-valid
// signals); the handshake, the group counter and the sync width are this
// design's own choices.
module cntrl #(
  parameter int unsigned WV     = 7,
  parameter int unsigned NI     = 2,
  parameter int unsigned SYNC_W = 3,
  localparam int unsigned NGRP  = (WV + NI - 1) / NI,
  localparam int unsigned G_W   = (NGRP > 1) ? $clog2(NGRP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [SYNC_W-1:0] sync_in,
  output logic              accept,
  output logic [G_W-1:0]    grp,
  output logic              step,
  output logic              col_last,
  output logic              out_valid,
  output logic [SYNC_W-1:0] sync_out
);

  logic              busy;
  logic [SYNC_W-1:0] col_sync;
  logic              v0, v1, pend;
  logic [SYNC_W-1:0] s0, s1, s2;

  assign col_last = busy && (32'(grp) == NGRP - 1);
  assign in_ready = !busy || col_last;
  assign accept   = in_valid && in_ready;
  assign step     = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      grp      <= '0;
      col_sync <= '0;
    end else if (accept) begin
      busy     <= 1'b1;
      grp      <= '0;
      col_sync <= sync_in;
    end else if (col_last) begin
      busy     <= 1'b0;
    end else if (busy) begin
      grp      <= grp + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; v1 <= 1'b0; s0 <= '0; s1 <= '0;
    end else if (step) begin
      v0 <= col_last;
      s0 <= col_sync;
      v1 <= v0;
      s1 <= s0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; s2 <= '0; out_valid <= 1'b0; sync_out <= '0;
    end else begin
      pend      <= step && v1;
      if (step) s2 <= s1;
      out_valid <= pend;
      if (pend) sync_out <= s2;
    end
  end

  // An offered pixel must stay offered until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !in_ready |=> in_valid);

endmodule
