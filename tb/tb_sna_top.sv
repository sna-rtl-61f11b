// tb_sna_top: end-to-end test of the SNA accelerator running a small siamese
// workload. Both sub-networks run the same layer with shared weights, one per main
// thread; sub-network 0 is additionally split into two branches (sub-threads) that
// run at the same time with their own weight buffers, after the shared weight
// banks are split. Then the sub-networks talk: a PU of thread 1 forwards two
// result vectors over the PU-to-PU link to a PU of thread 0, which consumes them
// as IFmaps. Finally thread 0 swaps the input/output roles of its buffers and runs
// a next layer on the previous layer's outputs, and thread 1 splits a reduction in
// two, parking the partial sums in the global buffer (STP) and loading them back
// into other FOB slots (LDP) before finishing it.
//
// The host fills the global buffer through the off-chip port, loads the two
// programs, starts, waits for done and reads the results back; all are compared
// with values computed here. The testbench counts how often each mechanism
// happened (bank conflicts, thread stalls, concurrent sub-threads and threads,
// forward-link stalls and transfers, role swaps, weight-bank split, pooling,
// ReLU, partial-sum stores and loads) and fails any that never did. Parameters
// are set by the includer: the
// default build is a small array; tb_sna_top_full runs the same test at the full
// default sizes.
module tb_sna_top;
  import sna_pkg::*;
  tb_sna_top_body #(.NPU(8), .WWORDS(256), .IWORDS(64), .BWORDS(1024)) body ();
endmodule
