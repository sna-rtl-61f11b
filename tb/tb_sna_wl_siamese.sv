// tb_sna_wl_siamese: workload test at the default sizes: one convolution layer of
// a siamese network, both sub-networks at once, on the whole 64-PU array.
//
// Each sub-network takes its own 16x16 single-channel image and applies the same
// 3x3 filter (shared weights), ReLU and 2-wide max pooling along the pixel rows.
// Thread t owns PUs 32t..32t+31 (the reset split), one output pixel per lane, so a
// thread covers all 256 pixels. The host stores each pixel's 3x3 neighbourhood
// (zero padded) as 9 consecutive words, so each lane runs a K = 9 reduction. The
// weights are broadcast to the 32 PUs of a group with a zero stride and the image
// tiles are spread with a per-PU stride. After the layer both embeddings are read
// back and checked word by word; the testbench also computes their L1 distance,
// the comparison a siamese network ends with.
//
// Rate checks: a run of K MACs keeps a PU busy for K+2 cycles, and since both
// threads start their runs one cycle apart, all 512 lanes of the array must
// perform a MAC in the same cycle for K-1 cycles.
module tb_sna_wl_siamese;
  import sna_pkg::*;
  localparam int K = 9, SIDE = 16, NPIX = SIDE * SIDE;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0, imem_tid = 0, start = 0, done;
  logic [7:0] imem_addr = 0;
  instr_t imem_wdata = '0;
  logic ext_req = 0, ext_we = 0, ext_gnt, ext_rvalid, fbmu_err;
  logic [BANK_W-1:0] ext_bank = 0;
  logic [GOFF_W-1:0] ext_addr = 0;
  data_t ext_wdata = 0, ext_rdata;

  int checks = 0, failures = 0, cycles = 0;
  int n_full_mac = 0, busy0 = 0, busy63 = 0;

  sna_top dut (.*);

  logic [N_PU-1:0] macv;
  for (genvar i = 0; i < int'(N_PU); i++) begin : g_tap
    assign macv[i] = dut.g_pu[i].u_pu.v_b;
  end

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && start === 0 && !done) begin
    cycles++;
    if (&macv) n_full_mac++;
    if (dut.pu_busy[0]) busy0++;
    if (dut.pu_busy[N_PU-1]) busy63++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
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

  function automatic instr_t I(op_e op, int stid = 0, lbuf_e lb = LB_NONE, int lane = 0,
                               int a = 0, int b = 0, int c = 0, int len = 0, int stride = 0,
                               int flags = 0);
    instr_t x;
    x = '0; x.op = op; x.stid = 2'(stid); x.lbuf = lb; x.lane = 4'(lane); x.a = GADDR_W'(a);
    x.b = LADDR_W'(b); x.c = LADDR_W'(c); x.len = LEN_W'(len); x.stride = GADDR_W'(stride);
    x.flags = FLAGS_W'(flags);
    return x;
  endfunction

  data_t F [K];
  data_t img [2][NPIX];
  instr_t prog [2][$];

  // 3x3 neighbourhood word j of pixel p, zero outside the image
  function automatic data_t nb(int t, int p, int j);
    int r, c;
    r = p / SIDE + j / 3 - 1;
    c = p % SIDE + j % 3 - 1;
    if (r < 0 || r >= SIDE || c < 0 || c >= SIDE) return 0;
    return img[t][r * SIDE + c];
  endfunction

  initial begin
    lbuf_e inb [2], outb [2];
    data_t d, e;
    data_t emb [2][NPIX / 2];
    longint l1;
    inb = '{LB_IN0, LB_IN1};
    outb = '{LB_OUT0, LB_OUT1};
    for (int j = 0; j < K; j++) F[j] = data_t'($urandom_range(0, 256) - 128);
    for (int t = 0; t < 2; t++)
      for (int p = 0; p < NPIX; p++) img[t][p] = data_t'($urandom_range(0, 1024) - 512);

    for (int t = 0; t < 2; t++) begin
      prog[t].push_back(I(OP_LDW, .lb(LB_W0), .a(0), .b(0), .len(K), .stride(0)));
      for (int l = 0; l < int'(LANES); l++)
        prog[t].push_back(I(OP_LDI, .lb(inb[t]), .lane(l), .a(l * K), .stride(LANES * K), .b(0), .len(K)));
      prog[t].push_back(I(OP_RUN, .b(0), .c(0), .a(0), .len(K), .flags((1 << F_RELU) | (1 << F_POOL0))));
      for (int l = 0; l < int'(LANES) / 2; l++)
        prog[t].push_back(I(OP_STO, .lb(outb[t]), .lane(l), .a(l), .stride(LANES / 2), .b(0), .len(1)));
      prog[t].push_back(I(OP_SYNC));
      prog[t].push_back(I(OP_HALT));
    end

    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int j = 0; j < K; j++) ext_write(6, j, F[j]);
    for (int t = 0; t < 2; t++)
      for (int p = 0; p < NPIX; p++)
        for (int j = 0; j < K; j++) ext_write(t ? 10 : 0, p * K + j, nb(t, p, j));
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < prog[t].size(); a++) begin
        imem_we = 1; imem_tid = 1'(t); imem_addr = 8'(a); imem_wdata = prog[t][a];
        @(posedge clk); #1;
      end
    imem_we = 0;
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin @(posedge clk); #1; end
    chk(!fbmu_err, "no unmapped buffer access");

    // pixel p = 8*m + l of thread t sits in lane l of PU 32t+m; pooled pair g of
    // that PU lands at global word 4*m + g
    for (int t = 0; t < 2; t++)
      for (int q = 0; q < NPIX / 2; q++) begin
        data_t v [2];
        for (int h = 0; h < 2; h++) begin
          acc_t s;
          s = 0;
          for (int j = 0; j < K; j++) s += acc_t'(F[j]) * acc_t'(nb(t, 2 * q + h, j));
          v[h] = sat_q(s);
        end
        e = v[0] > v[1] ? v[0] : v[1];
        if (e < 0) e = 0;
        ext_read(t ? 12 : 2, q, d);
        emb[t][q] = d;
        chk(d === e, $sformatf("sub-network %0d pooled output %0d: %0d exp %0d", t, q, d, e));
      end
    l1 = 0;
    for (int q = 0; q < NPIX / 2; q++)
      l1 += (emb[0][q] > emb[1][q]) ? longint'(emb[0][q]) - longint'(emb[1][q]) : longint'(emb[1][q]) - longint'(emb[0][q]);

    $display("cycles=%0d all-512-lane MAC cycles=%0d PU0 busy=%0d PU63 busy=%0d L1 distance=%0d",
             cycles, n_full_mac, busy0, busy63, l1);
    chk(busy0 == K + 2 && busy63 == K + 2, "a K-MAC run keeps a PU busy K+2 cycles");
    chk(n_full_mac == K - 1, "512 MACs per cycle while both threads' runs overlap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
