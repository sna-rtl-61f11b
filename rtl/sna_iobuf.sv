// sna_iobuf: private input/output buffer of one PU.
//
// One physical buffer is divided into two halves, each made of one bank per compute
// lane. At any time one half plays the input buffer (IFmaps, read by the lanes) and
// the other the output buffer (OFmaps, written by the PU). A swap pulse exchanges
// the roles, so the outputs of layer i-1 become the inputs of layer i without
// copying a word. sel names the physical half currently used as input.
//
// Ports: in_* writes one word into lane bank in_lane of the input half (from the
// global buffer); rd_addr reads the same address of every lane bank of the input
// half (to the lanes); out_* writes per-lane words into the output half (PU
// results); st_* reads one word of the output half (to the global buffer). Reads
// return data the next cycle. Every physical bank sees at most one read and one
// write per cycle. The role swap follows the document; the banking per lane and
// the port set are this design's choices.
module sna_iobuf
  import sna_pkg::*;
#(
  parameter int unsigned N     = LANES,
  parameter int unsigned WORDS = IOB_WORDS   // words per lane bank per half
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     swap,
  output logic                     sel,
  // write into the input half
  input  logic                     in_we,
  input  logic [$clog2(N)-1:0]     in_lane,
  input  logic [$clog2(WORDS)-1:0] in_addr,
  input  data_t                    in_wdata,
  // lane read of the input half
  input  logic                     rd_en,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output data_t                    rd_data [N],
  // write into the output half
  input  logic                     out_we [N],
  input  logic [$clog2(WORDS)-1:0] out_addr,
  input  data_t                    out_wdata [N],
  // read of the output half
  input  logic                     st_en,
  input  logic [$clog2(N)-1:0]     st_lane,
  input  logic [$clog2(WORDS)-1:0] st_addr,
  output data_t                    st_data
);

  data_t q [2][N];
  logic [$clog2(N)-1:0] st_lane_q;
  logic                 st_half_q;
  logic                 rd_half_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    sel <= 1'b0;
    else if (swap) sel <= ~sel;

  for (genvar h = 0; h < 2; h++) begin : g_half
    for (genvar l = 0; l < int'(N); l++) begin : g_lane
      data_t mem [WORDS];
      logic  is_in;
      logic  we, re;
      logic [$clog2(WORDS)-1:0] wa, ra;
      data_t wd;
      always_comb begin
        is_in = (sel == 1'(h));
        we = is_in ? (in_we && in_lane == l) : out_we[l];
        wa = is_in ? in_addr  : out_addr;
        wd = is_in ? in_wdata : out_wdata[l];
        re = is_in ? rd_en    : (st_en && st_lane == l);
        ra = is_in ? rd_addr  : st_addr;
      end
      always_ff @(posedge clk) begin
        if (we) mem[wa] <= wd;
        if (re) q[h][l] <= mem[ra];
      end
    end
  end

  always_ff @(posedge clk) begin
    st_lane_q <= st_lane;
    st_half_q <= ~sel;
    rd_half_q <= sel;
  end

  always_comb begin
    for (int l = 0; l < int'(N); l++) rd_data[l] = q[rd_half_q][l];
    st_data = q[st_half_q][st_lane_q];
  end

endmodule
