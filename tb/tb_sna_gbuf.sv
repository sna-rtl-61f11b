// tb_sna_gbuf: writes every bank of a reduced global buffer at once with distinct
// patterns, then reads all banks in parallel and checks the data and the one-cycle
// read latency; also checks that a bank without en keeps its output.
module tb_sna_gbuf;
  import sna_pkg::*;
  localparam int unsigned NB = GB_BANKS, W = 1024, AW = $clog2(W);
  logic clk = 0;
  logic en [NB], we [NB];
  logic [AW-1:0] addr [NB];
  data_t wdata [NB], rdata [NB];
  int checks = 0, failures = 0;

  sna_gbuf #(.NB(NB), .WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic data_t pat(int b, int a); return data_t'((b << 11) ^ (a * 7)); endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < int'(W); a++) begin
      for (int b = 0; b < int'(NB); b++) begin
        en[b] = 1; we[b] = 1; addr[b] = AW'(a); wdata[b] = pat(b, a);
      end
      @(posedge clk); #1;
    end
    for (int t = 0; t < 500; t++) begin
      int a [NB];
      for (int b = 0; b < int'(NB); b++) begin
        a[b] = $urandom_range(0, W - 1);
        en[b] = 1; we[b] = 0; addr[b] = AW'(a[b]);
      end
      @(posedge clk); #1;
      for (int b = 0; b < int'(NB); b++) begin
        checks++;
        if (rdata[b] !== pat(b, a[b])) begin
          failures++;
          $display("FAIL bank %0d addr %0d", b, a[b]);
        end
      end
      // idle cycle: outputs must hold
      for (int b = 0; b < int'(NB); b++) begin en[b] = 0; addr[b] = AW'(0); end
      @(posedge clk); #1;
      for (int b = 0; b < int'(NB); b++) begin
        checks++;
        if (rdata[b] !== pat(b, a[b])) begin
          failures++;
          $display("FAIL hold bank %0d", b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
