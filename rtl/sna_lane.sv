// sna_lane: one compute lane of a processing unit (PU).
//
// A lane is a multiply-and-accumulate (MAC) unit feeding a convolution accumulator
// (CACC) and a forward output buffer (FOB). Each cycle with mac_en high it adds w*x
// to the CACC. On the first MAC of a run the adder's other operand is chosen by a
// multiplexer: zero, or a partial sum kept in the FOB (use_fob), so a long
// reduction can be split over several runs. fob_we stores the CACC into FOB slot
// `slot`; the FOB thus holds both finished outputs and partial sums.
// A second, 16-bit port (ps_*) lets the data mover load and store FOB slots
// half by half (ps_hi selects bits 31:16), so partial sums can be parked in the
// global buffer; a CACC store in the same cycle takes precedence.
//
// Timing: acc is valid the cycle after the last mac_en; the FOB read is
// combinational. The lane structure (MAC, CACC, FOB, input mux) follows the PU
// microarchitecture; the FOB depth, the widths and the Q8.8 format are this
// design's choices.
module sna_lane
  import sna_pkg::*;
#(
  parameter int unsigned FOB_D = FOB_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      mac_en,   // accumulate w*x this cycle
  input  logic                      first,    // first MAC of a run
  input  logic                      use_fob,  // first MAC starts from FOB[slot]
  input  logic [$clog2(FOB_D)-1:0]  slot,
  input  data_t                     w,
  input  data_t                     x,
  input  logic                      fob_we,   // store CACC into FOB[slot]
  output acc_t                      acc,
  output acc_t                      fob_q,    // FOB[slot]
  // partial-sum port of the data mover
  input  logic                      ps_we,
  input  logic                      ps_hi,
  input  logic [$clog2(FOB_D)-1:0]  ps_slot,
  input  data_t                     ps_wdata,
  output data_t                     ps_rdata  // half ps_hi of FOB[ps_slot]
);

  acc_t fob [FOB_D];
  acc_t base;
  acc_t prod;

  assign fob_q    = fob[slot];
  assign ps_rdata = ps_hi ? fob[ps_slot][2*DATA_W-1:DATA_W] : fob[ps_slot][DATA_W-1:0];
  assign prod  = acc_t'(w) * acc_t'(x);
  always_comb base = first ? (use_fob ? fob[slot] : '0) : acc;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      acc <= '0;
    else if (mac_en) acc <= base + prod;

  // FOB: a small buffer, not reset; a slot is read only after it was written
  always_ff @(posedge clk)
    if (fob_we)     fob[slot] <= acc;
    else if (ps_we) begin
      if (ps_hi) fob[ps_slot][2*DATA_W-1:DATA_W] <= ps_wdata;
      else       fob[ps_slot][DATA_W-1:0]        <= ps_wdata;
    end

endmodule
