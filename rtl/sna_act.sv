// sna_act: activation unit of a PU.
//
// Applies ReLU to every lane result when en is high (negative values become zero)
// and passes the vector unchanged otherwise. Purely combinational. ReLU is the
// activation the accelerator supports; the enable is this design's choice.
module sna_act
  import sna_pkg::*;
#(
  parameter int unsigned N = LANES
) (
  input  logic  en,
  input  data_t din  [N],
  output data_t dout [N]
);

  always_comb
    for (int i = 0; i < int'(N); i++)
      dout[i] = (en && din[i] < 0) ? data_t'(0) : din[i];

endmodule
