// sna_wbuf: weight buffer of one PU.
//
// A simple dual-port memory (one write port, one read port) holding the PU's
// weights. The PU controller reads one weight per cycle and broadcasts it to every
// compute lane. Writes come from the global buffer through the thread's data mover.
// Read data appears the cycle after re. Default size is 5 KB of 16-bit words; the
// port arrangement is this design's choice.
module sna_wbuf
  import sna_pkg::*;
#(
  parameter int unsigned WORDS = WBUF_WORDS
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  data_t                    wdata,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output data_t                    rdata
);

  data_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
