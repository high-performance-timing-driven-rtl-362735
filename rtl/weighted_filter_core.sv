// weighted_filter_core: rank filter core with integer sample weights.
//
// Same sample and comparison-result registers as filter_core, but every
// comparison bit m[i][b] counts with the weight of position b, as if the bit
// were replicated WEIGHT(b) times before the one-counter. The one-counter of
// sample i thus gives the total weight of the samples smaller than it, a
// value in 0 .. W-1 (W = sum of the enabled weights). Because not every
// value in that range occurs, the ranked sample is the one whose weighted
// count is closest to rank: a difference unit forms |count - rank| for every
// position, and a tree of two-input minimum cells picks the smallest; each
// cell also passes on a flag telling whether its input "1" (the
// higher-numbered half) or "0" won, and the flags gathered from leaf to root
// form the address of the winner. On equal differences input "0" wins, so
// the lowest position among the closest is chosen.
//
// Pipeline (all stages advance on en): stage 1 comparison registers,
// stage 2 weighted one-counters, stage 3 difference units and minimum tree
// to the registered address. The address therefore has the same timing as
// filter_core's and can drive the same delay line. Positions are numbered as
// in filter_core.
//
// Weights are fixed at build time: WEIGHTS holds a WT_W-bit weight for each
// window position (c*WV + r, c = 0 the leftmost column, r = 0 the top row);
// a zero weight removes the position. The default of all ones makes it an
// ordinary rank filter. Weight width and defaults are this design's choice.
module weighted_filter_core #(
  parameter int unsigned            WV   = 7,
  parameter int unsigned            WH   = 7,
  parameter int unsigned            NI   = 2,
  parameter int unsigned            DW   = 10,
  parameter int unsigned            WT_W = 4,
  parameter logic [WV*WH*WT_W-1:0]  WEIGHTS = {(WV*WH){WT_W'(1)}},
  localparam int unsigned           WVV    = ((WV + NI - 1) / NI) * NI,
  localparam int unsigned           TAPV   = WVV * WH,
  localparam int unsigned           ADDR_W = $clog2(TAPV),
  localparam int unsigned           SUM_W  = $clog2(WV * WH * ((1 << WT_W) - 1) + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [NI-1:0][DW-1:0] in_val,
  input  logic [SUM_W-1:0]      rank,
  output logic [ADDR_W-1:0]     addr
);

  localparam int unsigned LEAVES = 1 << ADDR_W;

  // Weight of each virtual-kernel position at a column-complete cycle;
  // padding positions weigh zero.
  function automatic logic [TAPV-1:0][WT_W-1:0] pos_weights();
    logic [TAPV-1:0][WT_W-1:0] w;
    for (int i = 0; i < TAPV; i++) begin
      int unsigned age, row, col;
      age = i / WVV;
      row = WVV - 1 - (i % WVV);
      col = WH - 1 - age;
      w[i] = '0;
      if (row < WV) w[i] = WEIGHTS[(col*WV + row)*WT_W +: WT_W];
    end
    return w;
  endfunction

  localparam logic [TAPV-1:0][WT_W-1:0] PW = pos_weights();

  logic [TAPV-1:0][DW-1:0]   d;
  logic [TAPV-1:0][TAPV-1:0] m;

  rank_matrix #(.TAP(TAPV), .NI(NI), .DW(DW)) u_matrix (
    .clk, .rst_n, .en, .in_val, .d, .m
  );

  // Stage 2: weighted one-counters.
  logic [TAPV-1:0][SUM_W-1:0] cnt, cnt_nxt;

  always_comb begin
    for (int i = 0; i < TAPV; i++) begin
      cnt_nxt[i] = '0;
      for (int b = 0; b < TAPV; b++)
        if (m[i][b]) cnt_nxt[i] += SUM_W'(PW[b]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  cnt <= '0;
    else if (en) cnt <= cnt_nxt;
  end

  // Stage 3: difference units and minimum tree. Positions with zero weight
  // enter the tree with the largest difference so they are never chosen
  // while an enabled position exists.
  logic [LEAVES-1:0][SUM_W:0]    lvl_val;
  logic [LEAVES-1:0][ADDR_W-1:0] lvl_idx;
  logic [ADDR_W-1:0]             addr_nxt;

  always_comb begin
    for (int i = 0; i < LEAVES; i++) begin
      lvl_idx[i] = ADDR_W'(i);
      if (i < TAPV && PW[i] != '0)
        lvl_val[i] = (cnt[i] >= rank) ? {1'b0, cnt[i] - rank} : {1'b0, rank - cnt[i]};
      else
        lvl_val[i] = '1;
    end
    for (int n = LEAVES / 2; n >= 1; n = n / 2) begin
      for (int k = 0; k < n; k++) begin
        if (lvl_val[2*k+1] < lvl_val[2*k]) begin
          lvl_val[k] = lvl_val[2*k+1];
          lvl_idx[k] = lvl_idx[2*k+1];
        end else begin
          lvl_val[k] = lvl_val[2*k];
          lvl_idx[k] = lvl_idx[2*k];
        end
      end
    end
    addr_nxt = lvl_idx[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  addr <= '0;
    else if (en) addr <= addr_nxt;
  end

endmodule
