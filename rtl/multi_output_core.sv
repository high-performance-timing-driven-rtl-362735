// multi_output_core: rank core giving several outputs per column.
//
// When WV is not a multiple of NI, the virtual kernel has NP = WVV - WV
// extra rows. If those rows are filled with real image pixels (the next
// lines) instead of don't-care padding, the kernel contains NP+1 vertically
// overlapping WV x WH windows: window k covers kernel rows k .. k+WV-1. The
// comparison registers already hold every comparison all of them need, so
// only the masking, the one-counters, the equality comparators and the
// encoder are replicated, once per window. Each column then yields NP+1
// ranked pixels, lowering the core clock needed per output (Equation 4 of
// the architecture: FO = ceil(WV/NI) / (ceil(WV/NI)*NI - WV + 1) * FS).
//
// Positions are numbered as in filter_core: at the column-complete cycle
// position i holds column age i / WVV and kernel row WVV-1 - i % WVV
// (0 = top). addr[k] is the position of the ranked pixel of window k, with
// the same two-enabled-cycle latency as filter_core, so a delay line with
// NP+1 read ports can supply the colours. With WV a multiple of NI there is
// one window and the block equals filter_core.
//
// The replication follows the document; the pipeline and the adder-tree
// one-counters are this design's, as in filter_core.
module multi_output_core #(
  parameter int unsigned  WV  = 7,
  parameter int unsigned  WH  = 7,
  parameter int unsigned  NI  = 2,
  parameter int unsigned  DW  = 10,
  localparam int unsigned WVV    = ((WV + NI - 1) / NI) * NI,
  localparam int unsigned NOUT   = WVV - WV + 1,
  localparam int unsigned TAPV   = WVV * WH,
  localparam int unsigned ADDR_W = $clog2(TAPV),
  localparam int unsigned CNT_W  = $clog2(TAPV + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic [NI-1:0][DW-1:0]        in_val,
  input  logic [CNT_W-1:0]             rank,
  output logic [NOUT-1:0][ADDR_W-1:0]  addr
);

  // Positions belonging to window k (kernel rows k .. k+WV-1).
  function automatic logic [NOUT-1:0][TAPV-1:0] window_masks();
    logic [NOUT-1:0][TAPV-1:0] v;
    v = '0;
    for (int k = 0; k < NOUT; k++)
      for (int i = 0; i < TAPV; i++) begin
        int unsigned row;
        row = WVV - 1 - (i % WVV);
        v[k][i] = (row >= k) && (row < k + WV);
      end
    return v;
  endfunction

  localparam logic [NOUT-1:0][TAPV-1:0] VALID = window_masks();

  logic [TAPV-1:0][DW-1:0]   d;
  logic [TAPV-1:0][TAPV-1:0] m;

  rank_matrix #(.TAP(TAPV), .NI(NI), .DW(DW)) u_matrix (
    .clk, .rst_n, .en, .in_val, .d, .m
  );

  logic [NOUT-1:0][TAPV-1:0][CNT_W-1:0] cnt, cnt_nxt;
  logic [NOUT-1:0][ADDR_W-1:0]          addr_nxt;

  always_comb begin
    for (int k = 0; k < NOUT; k++)
      for (int i = 0; i < TAPV; i++) begin
        cnt_nxt[k][i] = '0;
        if (VALID[k][i])
          for (int b = 0; b < TAPV; b++)
            cnt_nxt[k][i] += CNT_W'(m[i][b] & VALID[k][b]);
      end
  end

  always_comb begin
    for (int k = 0; k < NOUT; k++) begin
      addr_nxt[k] = '0;
      for (int i = 0; i < TAPV; i++)
        if (VALID[k][i] && cnt[k][i] == rank) addr_nxt[k] |= ADDR_W'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      addr <= '0;
    end else if (en) begin
      cnt  <= cnt_nxt;
      addr <= addr_nxt;
    end
  end

endmodule
