// delay_line: addressable FIFO of full-colour pixels.
//
// The filter core ranks only a 10-bit filter value per pixel; the 24-bit
// colour of every pixel in the core is kept here, in a shift register that
// moves in step with the core (NI pixels per enabled cycle, lane NI-1 the
// newest). The core reports the winning position LAT enabled cycles after
// the window it ranked, by which time that pixel has moved LAT*NI places
// further, so the line is LAT*NI entries longer than the virtual kernel and
// is read at addr + LAT*NI.
//
// Interface: en shifts in in_pix; addr[k] selects read port k (NRD ports,
// one per core output), registered on
// every clock edge (not gated by en), so out_pix is valid one clock after
// the core's address and the delay line contents it refers to.
// The document specifies the block's role (addressable FIFO holding the
// pixels inside the core); the read offset and output register are this
// design's own.
module delay_line
  import rank_pkg::*;
#(
  parameter int unsigned TAPV = 56,
  parameter int unsigned NI   = 2,
  parameter int unsigned LAT  = 2,
  parameter int unsigned NRD  = 1,
  localparam int unsigned DEPTH  = TAPV + LAT * NI,
  localparam int unsigned ADDR_W = $clog2(TAPV)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  rgb_t [NI-1:0]     in_pix,
  input  logic [NRD-1:0][ADDR_W-1:0] addr,
  output rgb_t [NRD-1:0]             out_pix
);

  rgb_t [DEPTH-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (en) begin
      for (int i = 0; i < DEPTH; i++)
        q[i] <= (i < NI) ? in_pix[NI-1-i] : q[i-NI];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_pix <= '0;
    else
      for (int k = 0; k < NRD; k++)
        out_pix[k] <= q[32'(addr[k]) + LAT * NI];
  end

endmodule
