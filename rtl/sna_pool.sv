// sna_pool: pooling unit of a PU.
//
// Max pooling across the lane results: lanes hold neighbouring output pixels, and
// for a window of 2**win_log2 lanes output g is the maximum of lanes
// g*W .. g*W+W-1. A tree of comparators computes every window size; win_log2
// selects the tree level. valid[g] marks the outputs that exist (g < N/W).
// Combinational. The comparator tree follows the pooling unit's comparators; the
// window encoding and the lane-to-pixel mapping are this design's choices.
module sna_pool
  import sna_pkg::*;
#(
  parameter int unsigned N = LANES   // power of two
) (
  input  logic [1:0] win_log2,
  input  data_t      din   [N],
  output data_t      dout  [N],
  output logic       valid [N]
);

  localparam int unsigned LV = $clog2(N);
  localparam int unsigned SW = (LV > 0) ? $clog2(LV + 1) : 1;   // tree level index width

  data_t lvl [LV+1][N];
  logic [SW-1:0] sel;

  always_comb begin
    sel = (int'(win_log2) > int'(LV)) ? SW'(LV) : SW'(win_log2);
    for (int i = 0; i < int'(N); i++) lvl[0][i] = din[i];
    for (int j = 1; j <= int'(LV); j++)
      for (int i = 0; i < int'(N); i++)
        if (i < int'(N >> j))
          lvl[j][i] = (lvl[j-1][2*i] > lvl[j-1][2*i+1]) ? lvl[j-1][2*i] : lvl[j-1][2*i+1];
        else
          lvl[j][i] = '0;
    for (int i = 0; i < int'(N); i++) begin
      dout[i]  = lvl[sel][i];
      valid[i] = i < int'(N >> sel);
    end
  end

endmodule
