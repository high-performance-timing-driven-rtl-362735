// core_check: self-checking driver for one filter core configuration.
//
// Feeds NCOLS window columns of random filter values into filter_core (or
// weighted_filter_core when WEIGHTED is set), NI values per enabled cycle,
// with random stall cycles (en low) in between. For every column-complete
// cycle it keeps a copy of the window and, two enabled cycles later, checks
// the core's address against a reference computed here from that copy:
// ranks are counted directly over the window with the age rule for equal
// values (the older sample counts as smaller), or, in the weighted case,
// as the total weight of the smaller samples with the position closest to
// the rank chosen, the lowest position on equal distance. Values are drawn
// from a small range half the time so that equal values are common.
// Reports its check and failure counts and raises done when finished.
module core_check #(
  parameter int unsigned           WV       = 3,
  parameter int unsigned           WH       = 3,
  parameter int unsigned           NI       = 2,
  parameter logic [WV*WH-1:0]      WIN_MASK = '1,
  parameter bit                    WEIGHTED = 1'b0,
  parameter int unsigned           WT_W     = 4,
  parameter logic [WV*WH*WT_W-1:0] WEIGHTS  = {(WV*WH){WT_W'(1)}},
  parameter bit                    MULTI    = 1'b0,
  parameter int unsigned           NCOLS    = 200,
  parameter int unsigned           SEED     = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   ties,
  output bit   done
);
  localparam int unsigned DW     = 10;
  localparam int unsigned WVV    = ((WV + NI - 1) / NI) * NI;
  localparam int unsigned NGRP   = WVV / NI;
  localparam int unsigned TAPV   = WVV * WH;
  localparam int unsigned ADDR_W = $clog2(TAPV);
  localparam int unsigned NOUT   = MULTI ? WVV - WV + 1 : 1;
  localparam int unsigned RANK_W = WEIGHTED ? $clog2(WV * WH * ((1 << WT_W) - 1) + 1)
                                            : $clog2(TAPV + 1);

  logic                  en;
  logic [NI-1:0][DW-1:0] in_val;
  logic [RANK_W-1:0]     rank;
  logic [NOUT-1:0][ADDR_W-1:0] addr;

  if (MULTI) begin : g_dut
    multi_output_core #(.WV(WV), .WH(WH), .NI(NI), .DW(DW)) u_dut (
      .clk, .rst_n, .en, .in_val, .rank, .addr);
  end else if (WEIGHTED) begin : g_dut
    weighted_filter_core #(.WV(WV), .WH(WH), .NI(NI), .DW(DW), .WT_W(WT_W),
                           .WEIGHTS(WEIGHTS)) u_dut (
      .clk, .rst_n, .en, .in_val, .rank, .addr);
  end else begin : g_dut
    logic hit;
    filter_core #(.WV(WV), .WH(WH), .NI(NI), .DW(DW), .WIN_MASK(WIN_MASK)) u_dut (
      .clk, .rst_n, .en, .in_val, .rank, .addr, .addr_hit(hit));
  end

  // Reference model state
  int unsigned hist[$];            // every value entered, oldest first
  int unsigned valid_k[NOUT][TAPV];  // 1 if the position is inside window k
  int unsigned wgt_k[NOUT][TAPV];    // weight of each position in window k
  int unsigned valid[TAPV], wgt[TAPV];
  int unsigned snap[$][TAPV];      // windows waiting for their address
  int unsigned due[$];             // enabled-edge number at which it appears
  int unsigned nvalid, wsum, ecount;

  function automatic void build_masks(int unsigned k);
    nvalid = 0; wsum = 0;
    for (int i = 0; i < TAPV; i++) begin
      int unsigned row, col;
      row = WVV - 1 - (i % WVV);
      col = WH - 1 - i / WVV;
      valid[i] = 0; wgt[i] = 0;
      if (MULTI) begin
        valid[i] = (row >= k && row < k + WV);
        wgt[i]   = valid[i];
      end else if (row < WV) begin
        if (WEIGHTED) begin
          wgt[i]   = WEIGHTS[(col*WV + row)*WT_W +: WT_W];
          valid[i] = (wgt[i] != 0);
        end else begin
          valid[i] = WIN_MASK[col*WV + row];
          wgt[i]   = valid[i];
        end
      end
      nvalid += valid[i];
      wsum   += wgt[i];
    end
  endfunction

  function automatic bit smaller(int unsigned w[TAPV], int b, int i);
    return (w[b] < w[i]) || (w[b] == w[i] && b > i);
  endfunction

  function automatic int unsigned expect_addr(int unsigned w[TAPV], int unsigned r);
    int unsigned best, bestd;
    best = 0; bestd = 32'hffff_ffff;
    for (int i = 0; i < TAPV; i++) begin
      int unsigned c, dd;
      if (!valid[i]) continue;
      c = 0;
      for (int b = 0; b < TAPV; b++)
        if (b != i && valid[b] && smaller(w, b, i)) c += wgt[b];
      dd = (c > r) ? c - r : r - c;
      if (dd < bestd) begin bestd = dd; best = i; end
    end
    return best;
  endfunction

  function automatic bit has_tie(int unsigned w[TAPV]);
    for (int i = 0; i < TAPV; i++)
      for (int b = 0; b < i; b++)
        if (valid[i] && valid[b] && w[i] == w[b]) return 1;
    return 0;
  endfunction

  initial begin
    int unsigned seed, r_hold;
    seed = SEED;
    checks = 0; failures = 0; stalls = 0; ties = 0; done = 0; ecount = 0;
    en = 0; in_val = '0; rank = '0;
    for (int k = NOUT - 1; k >= 0; k--) begin
      build_masks(k);
      valid_k[k] = valid;
      wgt_k[k]   = wgt;
    end
    r_hold = $urandom(seed);
    @(posedge rst_n);
    @(negedge clk);
    for (int col = 0; col < NCOLS + 3; col++) begin
      bit narrow;
      narrow = $urandom_range(1, 0);
      rank  = RANK_W'($urandom_range(WEIGHTED ? wsum - 1 : nvalid - 1, 0));
      for (int g = 0; g < NGRP; g++) begin
        // random stall cycles
        while ($urandom_range(3, 0) == 0) begin
          en = 0;
          stalls++;
          @(negedge clk);
        end
        en = 1;
        for (int j = 0; j < NI; j++)
          in_val[j] = DW'(narrow ? $urandom_range(7, 0) : $urandom_range(765, 0));
        @(posedge clk);
        ecount++;
        for (int j = 0; j < NI; j++) hist.push_back(int'(in_val[j]));
        #1;
        if (due.size() > 0 && due[0] == ecount) begin
          for (int k = 0; k < NOUT; k++) begin
            int unsigned exp_a;
            valid = valid_k[k];
            wgt   = wgt_k[k];
            exp_a = expect_addr(snap[0], rank);
            checks++;
            if (int'(addr[k]) != exp_a) begin
              failures++;
              $display("core_check WV=%0d WH=%0d NI=%0d W=%0d M=%0d out %0d: addr %0d, expected %0d (rank %0d)",
                       WV, WH, NI, WEIGHTED, MULTI, k, addr[k], exp_a, rank);
            end
          end
          void'(snap.pop_front());
          void'(due.pop_front());
        end
        if (g == NGRP - 1 && col < NCOLS && hist.size() >= TAPV) begin
          int unsigned w[TAPV];
          for (int i = 0; i < TAPV; i++) w[i] = hist[hist.size() - 1 - i];
          if (has_tie(w)) ties++;
          snap.push_back(w);
          due.push_back(ecount + 2);
        end
        @(negedge clk);
      end
    end
    en = 0;
    if (due.size() != 0) begin
      failures++;
      $display("core_check: %0d addresses never checked", due.size());
    end
    done = 1;
  end

endmodule
