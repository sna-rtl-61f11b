// tb_sna_dma: checks one thread's data mover against a global-buffer model that
// grants requests after random delays and a model of the PU buffers. Loads with
// stride 0 (weight broadcast) and with a per-PU stride, and stores, must touch
// exactly the PUs of the group mask, in PU order, at the right addresses.
// Partial-sum loads and stores (FOB halves) must go to and come from the FOB.
module tb_sna_dma;
  import sna_pkg::*;
  localparam int unsigned NPU = 8;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, busy;
  mv_t cmd;
  logic [NPU-1:0] cmd_mask = '0;
  logic g_req, g_we, g_gnt, g_rvalid = 0;
  lbuf_e g_lbuf;
  logic [GADDR_W-1:0] g_addr;
  data_t g_wdata, g_rdata = 0;
  logic [$clog2(NPU)-1:0] p_idx;
  logic p_we, p_re;
  mv_e p_kind;
  logic [3:0] p_lane;
  logic [LADDR_W-1:0] p_addr;
  data_t p_wdata, p_rdata = 0;
  int checks = 0, failures = 0, n_wait = 0;

  data_t gmem [4096];              // one logical buffer, flat
  data_t wb [NPU][256];            // PU weight buffers
  data_t ib [NPU][256];            // PU input half, lane 3
  data_t ob [NPU][256];            // PU output half, lane 3
  data_t pb [NPU][32];             // PU FOB halves, lane 3
  int    pu_writes [NPU];

  sna_dma #(.NPU(NPU)) dut (.*);
  always #5 clk = ~clk;

  // global buffer model: random grant, read data next cycle
  assign g_gnt = g_req && ($urandom_range(0, 2) != 0);
  always @(posedge clk) begin
    g_rvalid <= g_req && g_gnt && !g_we;
    if (g_req && g_gnt) begin
      if (g_we) gmem[g_addr[11:0]] <= g_wdata;
      else      g_rdata <= gmem[g_addr[11:0]];
    end
    if (g_req && !g_gnt) n_wait++;
  end
  // PU buffer model
  always @(posedge clk) begin
    if (p_we) begin
      pu_writes[p_idx]++;
      if (p_kind == MV_LDW) wb[p_idx][p_addr[7:0]] <= p_wdata;
      else if (p_kind == MV_LDI && p_lane == 3) ib[p_idx][p_addr[7:0]] <= p_wdata;
      else if (p_kind == MV_LDP && p_lane == 3) pb[p_idx][p_addr[4:0]] <= p_wdata;
    end
    if (p_re) p_rdata <= (p_lane != 3)         ? data_t'(16'hdead) :
                         (p_kind == MV_STP)    ? pb[p_idx][p_addr[4:0]] :
                         (p_kind == MV_STO)    ? ob[p_idx][p_addr[7:0]] : data_t'(16'hbeef);
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(input mv_t c, input logic [NPU-1:0] m);
    cmd = c; cmd_mask = m; cmd_valid = 1;
    @(posedge clk); #1; cmd_valid = 0;
    chk(busy, "busy after command");
    while (busy) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = '0;
    for (int a = 0; a < 4096; a++) gmem[a] = data_t'(a * 3 + 1);
    for (int p = 0; p < int'(NPU); p++) begin
      pu_writes[p] = 0;
      for (int a = 0; a < 256; a++) begin wb[p][a] = 0; ib[p][a] = 0; ob[p][a] = data_t'(p * 256 + a); end
      for (int a = 0; a < 32; a++) pb[p][a] = 0;
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // broadcast weights to PUs 1,2,5
    begin
      mv_t c;
      c = '0; c.kind = MV_LDW; c.lbuf = LB_W0; c.gaddr = 100; c.stride = 0; c.laddr = 10; c.len = 20;
      issue(c, 8'b0010_0110);
      for (int p = 0; p < int'(NPU); p++) begin
        logic in;
        in = (p == 1 || p == 2 || p == 5);
        chk(pu_writes[p] == (in ? 20 : 0), $sformatf("write count PU %0d", p));
        if (in) for (int i = 0; i < 20; i++)
          chk(wb[p][10 + i] === gmem[100 + i], $sformatf("weight PU %0d word %0d", p, i));
      end
    end
    // strided IFmap load to lane 3 of PUs 0,3,4,7: member m gets gaddr + m*64
    begin
      mv_t c;
      int m;
      c = '0; c.kind = MV_LDI; c.lbuf = LB_IN0; c.lane = 3; c.gaddr = 1000; c.stride = 64; c.laddr = 0; c.len = 30;
      issue(c, 8'b1001_1001);
      m = 0;
      for (int p = 0; p < int'(NPU); p++)
        if (p == 0 || p == 3 || p == 4 || p == 7) begin
          for (int i = 0; i < 30; i++)
            chk(ib[p][i] === gmem[1000 + m * 64 + i], $sformatf("ifmap PU %0d word %0d", p, i));
          m++;
        end
    end
    // store lane 3 of the output half of PUs 2 and 6 with stride 16
    begin
      mv_t c;
      c = '0; c.kind = MV_STO; c.lbuf = LB_OUT0; c.lane = 3; c.gaddr = 3000; c.stride = 16; c.laddr = 5; c.len = 12;
      issue(c, 8'b0100_0100);
      for (int i = 0; i < 12; i++) begin
        chk(gmem[3000 + i] === ob[2][5 + i], "store PU 2");
        chk(gmem[3016 + i] === ob[6][5 + i], "store PU 6");
      end
    end
    // partial sums: load 3 slots (6 halves) into PUs 1 and 5, then store them back
    begin
      mv_t c;
      c = '0; c.kind = MV_LDP; c.lbuf = LB_OUT0; c.lane = 3; c.gaddr = 2000; c.stride = 6; c.laddr = 4; c.len = 6;
      issue(c, 8'b0010_0010);
      for (int i = 0; i < 6; i++) begin
        chk(pb[1][4 + i] === gmem[2000 + i], "psum load PU 1");
        chk(pb[5][4 + i] === gmem[2006 + i], "psum load PU 5");
      end
      chk(wb[1][4] !== gmem[2000] && ib[1][4] !== gmem[2000], "psum load left other buffers");
      c.kind = MV_STP; c.gaddr = 3500; c.stride = 8;
      issue(c, 8'b0010_0010);
      for (int i = 0; i < 6; i++) begin
        chk(gmem[3500 + i] === pb[1][4 + i], "psum store PU 1");
        chk(gmem[3508 + i] === pb[5][4 + i], "psum store PU 5");
      end
    end
    chk(n_wait > 0, "mover waited for a grant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
