// sna_gbuf: global on-chip buffer.
//
// NB independent single-port banks of WORDS 16-bit words each (16 x 50 KB =
// 800 KB by default). Each bank takes one read or one write per cycle; read data
// is returned the cycle after en. Which logical buffer a bank belongs to, and who
// may access it, is decided by the buffer management unit (sna_fbmu) in front of
// it. Bank count and total size follow the document; word width and single-port
// banks are this design's choices.
module sna_gbuf
  import sna_pkg::*;
#(
  parameter int unsigned NB    = GB_BANKS,
  parameter int unsigned WORDS = GB_WORDS
) (
  input  logic                     clk,
  input  logic                     en    [NB],
  input  logic                     we    [NB],
  input  logic [$clog2(WORDS)-1:0] addr  [NB],
  input  data_t                    wdata [NB],
  output data_t                    rdata [NB]
);

  for (genvar b = 0; b < int'(NB); b++) begin : g_bank
    data_t mem [WORDS];
    always_ff @(posedge clk)
      if (en[b]) begin
        if (we[b]) mem[addr[b]] <= wdata[b];
        else       rdata[b]     <= mem[addr[b]];
      end
  end

endmodule
