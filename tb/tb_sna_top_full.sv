// tb_sna_top_full: the end-to-end siamese test of tb_sna_top on the accelerator
// built with all its default sizes (64 PUs x 8 lanes, 5 KB weight and 10 KB
// input/output buffer per PU, 16 x 50 KB global buffer).
module tb_sna_top_full;
  tb_sna_top_body #(.FULL(1)) body ();
endmodule
