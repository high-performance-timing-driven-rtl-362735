// rank_pkg: types and constants shared by the rank filter blocks.
//
// Pixels travel through the filter as 24-bit RGB words (8 bits per
// component). The filter value that is actually ranked is a 10-bit
// magnitude, the sum of the three components, which is wide enough to hold
// 3*255 without overflow. Both widths follow the 24-bit RGB input and 10-bit
// filter value used for the filter's reference implementation.
package rank_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  localparam int unsigned FV_W = 10;   // width of a filter value
  typedef logic [FV_W-1:0] fv_t;

  // Rows of the virtual kernel: the window height rounded up to a whole
  // number of NI-sample groups.
  function automatic int unsigned virt_rows(int unsigned wv, int unsigned ni);
    return ((wv + ni - 1) / ni) * ni;
  endfunction

endpackage
