// tb_sna_act: checks ReLU on random vectors, with the unit enabled and bypassed.
module tb_sna_act;
  import sna_pkg::*;
  logic en;
  data_t din [LANES], dout [LANES];
  int checks = 0, failures = 0;

  sna_act dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      en = 1'($urandom_range(0, 1));
      for (int i = 0; i < int'(LANES); i++) din[i] = data_t'($urandom_range(0, 65535));
      #1;
      for (int i = 0; i < int'(LANES); i++) begin
        data_t e;
        e = (en && din[i][DATA_W-1]) ? data_t'(0) : din[i];
        checks++;
        if (dout[i] !== e) begin
          failures++;
          $display("FAIL en=%0b in=%0d out=%0d", en, din[i], dout[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
