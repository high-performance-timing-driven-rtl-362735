// filter_core: rank filter core (word-serial for NI = 1, multiword for NI > 1).
//
// The WV x WH window is fed column by column, NI samples per enabled cycle.
// When WV is not a multiple of NI, each column is padded at the bottom to
// WVV = ceil(WV/NI)*NI rows, forming a virtual kernel of TAPV = WVV*WH
// positions; padding samples are compared like any other sample (their value
// does not matter) and masked out afterwards. The same mask also removes
// positions outside a non-rectangular window (WIN_MASK).
//
// Pipeline, each stage advancing only when en is high:
//   stage 1  rank_matrix: window registers and comparison-result registers
//   stage 2  one-counters: for every valid position, the number of valid
//            positions counting as smaller (adder tree over the masked bits)
//   stage 3  equality of each count with rank, one-hot to binary encoder:
//            addr is the window position holding the ranked sample
// The address is only meaningful for the enabled cycle in which the last
// group of a column entered; at that point position i holds the sample of
// column age a = i / WVV (0 = newest column) and row r = WVV-1 - i % WVV
// (0 = top row). The controller knows which cycles these are. The address
// appears two enabled cycles after that column-completing cycle.
//
// Following the document: the data/comparison shift structure, negated
// comparator outputs for the new sample's register, one-counters, equality
// comparators only for real window positions, an encoder, and masking
// placed after the comparison registers. Own choices: all one-counters are
// adder trees (the incrementer/decrementer variant for the old samples is
// not used), the mask is applied as a constant at the column-complete cycle
// only, and rank is sampled by stage 3.
//
// WIN_MASK bit (c*WV + r) enables window column c (0 = leftmost, oldest)
// and row r (0 = top); all ones gives the rectangular window. rank runs from
// 0 (minimum) to the number of enabled positions minus 1 (maximum).
module filter_core #(
  parameter int unsigned            WV  = 7,
  parameter int unsigned            WH  = 7,
  parameter int unsigned            NI  = 2,
  parameter int unsigned            DW  = 10,
  parameter logic [WV*WH-1:0]       WIN_MASK = '1,
  localparam int unsigned           WVV    = ((WV + NI - 1) / NI) * NI,
  localparam int unsigned           TAPV   = WVV * WH,
  localparam int unsigned           ADDR_W = $clog2(TAPV),
  localparam int unsigned           CNT_W  = $clog2(TAPV + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [NI-1:0][DW-1:0] in_val,
  input  logic [CNT_W-1:0]      rank,
  output logic [ADDR_W-1:0]     addr,
  output logic                  addr_hit
);

  // Valid positions of the virtual kernel at a column-complete cycle.
  function automatic logic [TAPV-1:0] valid_mask();
    logic [TAPV-1:0] v;
    v = '0;
    for (int i = 0; i < TAPV; i++) begin
      int unsigned age, row, col;
      age = i / WVV;
      row = WVV - 1 - (i % WVV);
      col = WH - 1 - age;
      if (row < WV) v[i] = WIN_MASK[col*WV + row];
    end
    return v;
  endfunction

  localparam logic [TAPV-1:0] VALID = valid_mask();

  logic [TAPV-1:0][DW-1:0]   d;
  logic [TAPV-1:0][TAPV-1:0] m;

  rank_matrix #(.TAP(TAPV), .NI(NI), .DW(DW)) u_matrix (
    .clk, .rst_n, .en, .in_val, .d, .m
  );

  // Stage 2: masked one-counters.
  logic [TAPV-1:0][CNT_W-1:0] cnt, cnt_nxt;

  always_comb begin
    for (int i = 0; i < TAPV; i++) begin
      cnt_nxt[i] = '0;
      if (VALID[i])
        for (int b = 0; b < TAPV; b++)
          cnt_nxt[i] += CNT_W'(m[i][b] & VALID[b]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  cnt <= '0;
    else if (en) cnt <= cnt_nxt;
  end

  // Stage 3: equality comparators and encoder.
  logic [TAPV-1:0]   eq;
  logic [ADDR_W-1:0] addr_nxt;

  always_comb begin
    addr_nxt = '0;
    for (int i = 0; i < TAPV; i++) begin
      eq[i] = VALID[i] && (cnt[i] == rank);
      if (eq[i]) addr_nxt |= ADDR_W'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr     <= '0;
      addr_hit <= 1'b0;
    end else if (en) begin
      addr     <= addr_nxt;
      addr_hit <= |eq;
    end
  end

endmodule
