// rank_matrix: sample registers and comparison-result registers of the
// filter core.
//
// The window is a shift register of TAP filter values, d[0] the newest and
// d[TAP-1] the oldest. Next to every sample i sits a TAP-bit register m[i]
// whose bit b is 1 when sample b counts as smaller than sample i. Equal
// values are ordered by age (the older one counts as smaller), so every
// sample gets a distinct rank and the number of ones in m[i] is exactly the
// rank of sample i in the window.
//
// Each enabled cycle NI new samples enter and the NI oldest drop out. All
// registers move NI places towards the old end, and the comparison registers
// move NI places diagonally (row and column), so comparisons between two old
// samples are kept rather than recomputed; this is the CR[k] =
// {CR[k-1], C[k]} shift of the word-serial core, generalised to NI samples.
// Only pairs that include a new sample are compared:
// (TAP-NI)*NI + NI*(NI-1)/2 comparators. One comparator serves both bits of
// a pair: m[i][b] is its result and m[b][i] its inverse, which is how the
// new sample's own register (CN) is formed from the inverted comparator
// outputs. Comparators look at the incoming samples and the registers they
// will be compared with after the shift, so the window and its comparison
// bits are always consistent in the same cycle.
//
// Interface: in_val[j] are the NI new samples; lane NI-1 is the newest and
// lands in d[0], lane 0 lands in d[NI-1]. en advances the shift. Latency:
// d and m reflect a sample one clock after the enabled edge that takes it.
// Reset empties the window to zeros with a consistent comparison matrix.
module rank_matrix #(
  parameter int unsigned TAP = 8,
  parameter int unsigned NI  = 2,
  parameter int unsigned DW  = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [NI-1:0][DW-1:0]  in_val,
  output logic [TAP-1:0][DW-1:0] d,
  output logic [TAP-1:0][TAP-1:0] m
);

  logic [TAP-1:0][DW-1:0]  d_nxt;
  logic [TAP-1:0][TAP-1:0] m_nxt;

  always_comb begin
    for (int i = 0; i < TAP; i++) begin
      if (i < NI) d_nxt[i] = in_val[NI-1-i];
      else        d_nxt[i] = d[i-NI];
    end
    m_nxt = '0;
    for (int i = 0; i < TAP; i++) begin
      for (int b = 0; b < TAP; b++) begin
        if (i >= NI && b >= NI) begin
          m_nxt[i][b] = m[i-NI][b-NI];
        end else if (b < i) begin
          // b is newer than i: b counts as smaller only if strictly smaller
          m_nxt[i][b] = d_nxt[b] < d_nxt[i];
          m_nxt[b][i] = !(d_nxt[b] < d_nxt[i]);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0;
      for (int i = 0; i < TAP; i++)
        for (int b = 0; b < TAP; b++)
          m[i][b] <= (b > i);
    end else if (en) begin
      d <= d_nxt;
      m <= m_nxt;
    end
  end

endmodule
