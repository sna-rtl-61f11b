// tb_sna_fbmu: checks the buffer management unit in front of a global buffer.
// The off-chip port fills every bank with a pattern that names the bank; logical
// reads must then land on the bank the table selects: first in the reset siamese
// layout, then after banks 6-9 are split into four branch weight buffers. Also
// checks parallel service of different banks, round-robin arbitration when all
// three ports want one bank, and the error flag for an unmapped logical buffer.
module tb_sna_fbmu;
  import sna_pkg::*;
  localparam int unsigned NB = GB_BANKS, W = 256, NLP = 2;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [BANK_W-1:0] cfg_bank = 0;
  lbuf_e cfg_lbuf = LB_IN0;
  lbuf_e map [NB];
  logic lp_req [NLP], lp_we [NLP], lp_gnt [NLP], lp_rvalid [NLP];
  lbuf_e lp_lbuf [NLP];
  logic [GADDR_W-1:0] lp_addr [NLP];
  data_t lp_wdata [NLP], lp_rdata [NLP];
  logic ext_req = 0, ext_we = 0, ext_gnt, ext_rvalid;
  logic [BANK_W-1:0] ext_bank = 0;
  logic [GOFF_W-1:0] ext_addr = 0;
  data_t ext_wdata = 0, ext_rdata;
  logic b_en [NB], b_we [NB];
  logic [$clog2(W)-1:0] b_addr [NB];
  data_t b_wdata [NB], b_rdata [NB];
  logic err, conflict;
  int checks = 0, failures = 0, n_conflict = 0;

  sna_fbmu #(.NB(NB), .WORDS(W), .NLP(NLP)) dut (.*);
  sna_gbuf #(.NB(NB), .WORDS(W)) u_gbuf (.clk, .en (b_en), .we (b_we), .addr (b_addr),
                                        .wdata (b_wdata), .rdata (b_rdata));
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && conflict) n_conflict++;

  function automatic data_t pat(int b, int a); return data_t'((b << 8) | a); endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one logical read on port p, returns data; checks it arrives one cycle after grant
  task automatic lread(input int p, input lbuf_e lb, input int rank, input int off, output data_t d);
    lp_req[p] = 1; lp_we[p] = 0; lp_lbuf[p] = lb;
    lp_addr[p] = {GRANK_W'(rank), GOFF_W'(off)};
    #1;
    while (!lp_gnt[p]) begin @(posedge clk); #1; end
    @(posedge clk); #1; lp_req[p] = 0;
    chk(lp_rvalid[p], "rvalid one cycle after grant");
    d = lp_rdata[p];
  endtask

  task automatic expect_bank(input lbuf_e lb, input int rank, input int bank);
    data_t d;
    int off;
    off = $urandom_range(0, W - 1);
    lread(0, lb, rank, off, d);
    chk(d === pat(bank, off), $sformatf("%s rank %0d -> bank %0d (got %0h)", lb.name(), rank, bank, d));
  endtask

  initial begin
    for (int p = 0; p < int'(NLP); p++) begin
      lp_req[p] = 0; lp_we[p] = 0; lp_lbuf[p] = LB_IN0; lp_addr[p] = 0; lp_wdata[p] = 0;
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // reset layout: 0-1 IN0, 2-5 OUT0, 6-9 W, 10-11 IN1, 12-15 OUT1
    for (int b = 0; b < int'(NB); b++) begin
      lbuf_e e;
      e = b < 2 ? LB_IN0 : b < 6 ? LB_OUT0 : b < 10 ? LB_W0 : b < 12 ? LB_IN1 : LB_OUT1;
      chk(map[b] == e, $sformatf("reset map bank %0d", b));
    end
    // fill through the off-chip port
    for (int b = 0; b < int'(NB); b++)
      for (int a = 0; a < int'(W); a++) begin
        ext_req = 1; ext_we = 1; ext_bank = BANK_W'(b); ext_addr = GOFF_W'(a); ext_wdata = pat(b, a);
        #1; chk(ext_gnt, "ext grant on idle bank");
        @(posedge clk); #1;
      end
    ext_req = 0;
    expect_bank(LB_IN0, 0, 0);  expect_bank(LB_IN0, 1, 1);
    expect_bank(LB_OUT0, 0, 2); expect_bank(LB_OUT0, 3, 5);
    expect_bank(LB_W0, 0, 6);   expect_bank(LB_W0, 3, 9);
    expect_bank(LB_IN1, 1, 11); expect_bank(LB_OUT1, 2, 14);
    chk(!err, "no error so far");
    // split the weight banks: 6->W0, 7->W1, 8->W2, 9->W3
    for (int b = 6; b < 10; b++) begin
      cfg_we = 1; cfg_bank = BANK_W'(b); cfg_lbuf = lbuf_e'(int'(LB_W0) + b - 6);
      @(posedge clk); #1;
    end
    cfg_we = 0;
    expect_bank(LB_W0, 0, 6); expect_bank(LB_W1, 0, 7);
    expect_bank(LB_W2, 0, 8); expect_bank(LB_W3, 0, 9);
    // a logical write lands in the mapped bank
    lp_req[1] = 1; lp_we[1] = 1; lp_lbuf[1] = LB_W2; lp_addr[1] = 19'd5; lp_wdata[1] = 16'hbeef;
    #1; chk(lp_gnt[1], "write grant");
    @(posedge clk); #1; lp_req[1] = 0; lp_we[1] = 0;
    ext_req = 1; ext_we = 0; ext_bank = 8; ext_addr = 5;
    @(posedge clk); #1; ext_req = 0;
    chk(ext_rvalid && ext_rdata === 16'hbeef, "logical write reached bank 8");
    // two ports, two banks: both granted in one cycle
    lp_req[0] = 1; lp_we[0] = 0; lp_lbuf[0] = LB_IN0; lp_addr[0] = 19'd3;
    lp_req[1] = 1; lp_we[1] = 0; lp_lbuf[1] = LB_IN1; lp_addr[1] = 19'd4;
    #1; chk(lp_gnt[0] && lp_gnt[1] && !conflict, "parallel grants");
    @(posedge clk); #1; lp_req[0] = 0; lp_req[1] = 0;
    chk(lp_rdata[0] === pat(0, 3) && lp_rdata[1] === pat(10, 4), "parallel data");
    // three ports on bank 12: each served once in three cycles
    begin
      int served [3];
      int gp [3];
      served = '{0, 0, 0};
      lp_req[0] = 1; lp_lbuf[0] = LB_OUT1; lp_addr[0] = 19'd1;
      lp_req[1] = 1; lp_lbuf[1] = LB_OUT1; lp_addr[1] = 19'd2;
      ext_req = 1; ext_we = 0; ext_bank = 12; ext_addr = 3;
      for (int c = 0; c < 3; c++) begin
        #1;
        gp[0] = lp_gnt[0]; gp[1] = lp_gnt[1]; gp[2] = ext_gnt;
        chk(gp[0] + gp[1] + gp[2] == 1, "exactly one grant per cycle");
        for (int q = 0; q < 3; q++) served[q] += gp[q];
        @(posedge clk);
        #1;
        if (gp[0]) begin lp_req[0] = 0; chk(lp_rdata[0] === pat(12, 1), "rr data p0"); end
        if (gp[1]) begin lp_req[1] = 0; chk(lp_rdata[1] === pat(12, 2), "rr data p1"); end
        if (gp[2]) begin ext_req = 0;   chk(ext_rdata === pat(12, 3), "rr data ext"); end
      end
      chk(served[0] == 1 && served[1] == 1 && served[2] == 1, "round robin served all");
      chk(n_conflict > 0, "conflict seen");
    end
    // unmapped buffer
    lp_req[0] = 1; lp_lbuf[0] = LB_IN0; lp_addr[0] = {4'd5, 15'd0};
    #1; chk(lp_gnt[0], "miss granted");
    @(posedge clk); #1; lp_req[0] = 0;
    chk(err, "error flag on unmapped rank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
