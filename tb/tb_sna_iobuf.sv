// tb_sna_iobuf: checks the two-role PU buffer. Writes IFmaps into the input half and
// OFmaps into the output half, reads both back through their own ports, then swaps
// the roles and checks that the former outputs are now read as inputs (and the
// former inputs drained as outputs) without any copy.
module tb_sna_iobuf;
  import sna_pkg::*;
  localparam int unsigned N = LANES, W = IOB_WORDS, AW = $clog2(W), LW = $clog2(N);
  logic clk = 0, rst_n = 0, swap = 0, sel;
  logic in_we = 0, rd_en = 0, st_en = 0;
  logic [LW-1:0] in_lane = 0, st_lane = 0;
  logic [AW-1:0] in_addr = 0, rd_addr = 0, out_addr = 0, st_addr = 0;
  data_t in_wdata = 0, rd_data [N], out_wdata [N], st_data;
  logic out_we [N];
  int checks = 0, failures = 0;

  sna_iobuf dut (.*);
  always #5 clk = ~clk;

  function automatic data_t pa(int l, int a); return data_t'(l * 1000 + a); endfunction
  function automatic data_t pb(int l, int a); return data_t'(16'h8000 + l * 900 + a * 3); endfunction

  task automatic chk(input data_t got, input data_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < int'(N); l++) begin out_we[l] = 0; out_wdata[l] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    chk(data_t'(sel), 0, "sel after reset");
    // fill input half (lane by lane) and output half (all lanes per cycle)
    for (int a = 0; a < int'(W); a++) begin
      for (int l = 0; l < int'(N); l++) begin
        in_we = 1; in_lane = LW'(l); in_addr = AW'(a); in_wdata = pa(l, a);
        @(posedge clk); #1;
      end
      in_we = 0;
      for (int l = 0; l < int'(N); l++) begin out_we[l] = 1; out_wdata[l] = pb(l, a); end
      out_addr = AW'(a);
      @(posedge clk); #1;
      for (int l = 0; l < int'(N); l++) out_we[l] = 0;
    end
    for (int t = 0; t < 400; t++) begin
      int a, l;
      a = $urandom_range(0, W - 1); l = $urandom_range(0, N - 1);
      rd_en = 1; rd_addr = AW'(a); st_en = 1; st_lane = LW'(l); st_addr = AW'(W - 1 - a);
      @(posedge clk); #1; rd_en = 0; st_en = 0;
      for (int j = 0; j < int'(N); j++) chk(rd_data[j], pa(j, a), "input read");
      chk(st_data, pb(l, W - 1 - a), "output read");
    end
    swap = 1; @(posedge clk); #1; swap = 0;
    chk(data_t'(sel), 1, "sel after swap");
    for (int t = 0; t < 400; t++) begin
      int a, l;
      a = $urandom_range(0, W - 1); l = $urandom_range(0, N - 1);
      rd_en = 1; rd_addr = AW'(a); st_en = 1; st_lane = LW'(l); st_addr = AW'(a);
      @(posedge clk); #1; rd_en = 0; st_en = 0;
      for (int j = 0; j < int'(N); j++) chk(rd_data[j], pb(j, a), "swapped input read");
      chk(st_data, pa(l, a), "swapped output read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
