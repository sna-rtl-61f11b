// tb_sna_wbuf: fills the weight buffer at its full default size with a pattern and
// reads back random and sequential addresses, checking the one-cycle read latency.
module tb_sna_wbuf;
  import sna_pkg::*;
  localparam int unsigned AW = $clog2(WBUF_WORDS);
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  data_t wdata = 0, rdata;
  int checks = 0, failures = 0;

  sna_wbuf dut (.*);
  always #5 clk = ~clk;

  function automatic data_t pat(int a);
    return data_t'((a * 40503 + 17) & 16'hffff);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < int'(WBUF_WORDS); a++) begin
      we = 1; waddr = AW'(a); wdata = pat(a);
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 3000; t++) begin
      int a;
      a = (t < 1000) ? t : $urandom_range(0, WBUF_WORDS - 1);
      re = 1; raddr = AW'(a);
      @(posedge clk); #1;
      re = 0;
      checks++;
      if (rdata !== pat(a)) begin
        failures++;
        $display("FAIL addr %0d got %0h", a, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
