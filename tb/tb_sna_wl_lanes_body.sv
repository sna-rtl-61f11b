// tb_sna_wl_lanes_body: one point of the lane-count sweep, used by
// tb_sna_wl_lanes. An 8-PU accelerator with NL lanes per PU runs one layer on
// both sub-networks at once: every PU of a thread (the reset split, PUs 4t..4t+3)
// gets the shared K weights by broadcast and its own tile of NL input vectors,
// runs K MACs per lane with ReLU, and the 4*NL outputs of each thread are stored
// and compared with a model. Also checks that a K-MAC run keeps a PU busy K+2
// cycles whatever the lane count, and that the two threads computed at once.
// Reports its counts on its ports; the sweep testbench adds them up.
module tb_sna_wl_lanes_body
  import sna_pkg::*;
#(
  parameter int unsigned NL = LANES
) (
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int K = 8, NPU = 8, PPT = NPU / 2;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0, imem_tid = 0, start = 0, done;
  logic [7:0] imem_addr = 0;
  instr_t imem_wdata = '0;
  logic ext_req = 0, ext_we = 0, ext_gnt, ext_rvalid, fbmu_err;
  logic [BANK_W-1:0] ext_bank = 0;
  logic [GOFF_W-1:0] ext_addr = 0;
  data_t ext_wdata = 0, ext_rdata;
  int busy0 = 0, n_both = 0;

  sna_top #(.NPU(NPU), .NL(NL), .WWORDS(64), .IWORDS(32), .BWORDS(1024)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && start === 0 && !done) begin
    if (dut.pu_busy[0]) busy0++;
    if (|dut.pu_busy[3:0] && |dut.pu_busy[7:4]) n_both++;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL NL=%0d %s", NL, what); end
  endtask

  task automatic ext_write(input int bank, input int a, input data_t d);
    ext_req = 1; ext_we = 1; ext_bank = BANK_W'(bank); ext_addr = GOFF_W'(a); ext_wdata = d;
    #1 while (!ext_gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1; ext_req = 0; ext_we = 0;
  endtask

  task automatic ext_read(input int bank, input int a, output data_t d);
    ext_req = 1; ext_we = 0; ext_bank = BANK_W'(bank); ext_addr = GOFF_W'(a);
    #1 while (!ext_gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1; ext_req = 0;
    d = ext_rdata;
  endtask

  function automatic instr_t I(op_e op, lbuf_e lb = LB_NONE, int lane = 0, int a = 0,
                               int b = 0, int c = 0, int len = 0, int stride = 0, int flags = 0);
    instr_t x;
    x = '0; x.op = op; x.lbuf = lb; x.lane = 4'(lane); x.a = GADDR_W'(a);
    x.b = LADDR_W'(b); x.c = LADDR_W'(c); x.len = LEN_W'(len); x.stride = GADDR_W'(stride);
    x.flags = FLAGS_W'(flags);
    return x;
  endfunction

  data_t Wv [K];
  data_t X [2][PPT * NL * K];     // thread, (PU member * NL + lane) * K + k
  instr_t prog [2][$];

  initial begin
    lbuf_e inb [2], outb [2];
    data_t d, e;
    fin = 0; checks = 0; failures = 0;
    inb = '{LB_IN0, LB_IN1};
    outb = '{LB_OUT0, LB_OUT1};
    for (int k = 0; k < K; k++) Wv[k] = data_t'($urandom_range(0, 128) - 64);
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < PPT * int'(NL) * K; i++) X[t][i] = data_t'($urandom_range(0, 512) - 256);
    for (int t = 0; t < 2; t++) begin
      prog[t].push_back(I(OP_LDW, .lb(LB_W0), .a(0), .b(0), .len(K)));
      for (int l = 0; l < int'(NL); l++)
        prog[t].push_back(I(OP_LDI, .lb(inb[t]), .lane(l), .a(l * K), .stride(int'(NL) * K), .b(0), .len(K)));
      prog[t].push_back(I(OP_RUN, .b(0), .c(0), .a(0), .len(K), .flags(1 << F_RELU)));
      for (int l = 0; l < int'(NL); l++)
        prog[t].push_back(I(OP_STO, .lb(outb[t]), .lane(l), .a(l), .stride(int'(NL)), .b(0), .len(1)));
      prog[t].push_back(I(OP_SYNC));
      prog[t].push_back(I(OP_HALT));
    end

    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < K; k++) ext_write(6, k, Wv[k]);
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < PPT * int'(NL) * K; i++) ext_write(t ? 10 : 0, i, X[t][i]);
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < prog[t].size(); a++) begin
        imem_we = 1; imem_tid = 1'(t); imem_addr = 8'(a); imem_wdata = prog[t][a];
        @(posedge clk); #1;
      end
    imem_we = 0;
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin @(posedge clk); #1; end
    chk(!fbmu_err, "no unmapped buffer access");
    for (int t = 0; t < 2; t++)
      for (int j = 0; j < PPT * int'(NL); j++) begin
        acc_t s;
        s = 0;
        for (int k = 0; k < K; k++) s += acc_t'(Wv[k]) * acc_t'(X[t][j * K + k]);
        e = sat_q(s);
        if (e < 0) e = 0;
        ext_read(t ? 12 : 2, j, d);
        chk(d === e, $sformatf("thread %0d output %0d: %0d exp %0d", t, j, d, e));
      end
    chk(busy0 == K + 2, $sformatf("run latency %0d exp %0d", busy0, K + 2));
    chk(n_both > 0, "both threads computed at once");
    $display("NL=%0d: checks=%0d failures=%0d", NL, checks, failures);
    fin = 1;
  end
endmodule
