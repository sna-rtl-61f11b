// tb_sna_pool: checks max pooling over lane windows of 1, 2, 4 and 8 lanes.
module tb_sna_pool;
  import sna_pkg::*;
  logic [1:0] win_log2;
  data_t din [LANES], dout [LANES];
  logic valid [LANES];
  int checks = 0, failures = 0;

  sna_pool dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int wsz;
      win_log2 = 2'(t % 4);
      wsz = 1 << (t % 4);
      for (int i = 0; i < int'(LANES); i++) din[i] = data_t'($urandom_range(0, 65535));
      #1;
      for (int g = 0; g < int'(LANES); g++) begin
        checks++;
        if (valid[g] !== (g < int'(LANES) / wsz)) begin
          failures++;
          $display("FAIL valid[%0d] win %0d", g, wsz);
        end
        if (g < int'(LANES) / wsz) begin
          data_t m;
          m = din[g*wsz];
          for (int j = 1; j < wsz; j++) if (din[g*wsz+j] > m) m = din[g*wsz+j];
          checks++;
          if (dout[g] !== m) begin
            failures++;
            $display("FAIL win %0d out[%0d]=%0d exp %0d", wsz, g, dout[g], m);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
