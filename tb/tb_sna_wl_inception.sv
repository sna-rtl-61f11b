// tb_sna_wl_inception: workload test: an inception-style layer run by both
// sub-networks of a siamese network at once.
//
// Each main thread computes the same layer on its own image with the shared
// weights: four parallel 1x1-convolution branches over C = 8 input channels with
// 2, 3, 2 and 1 output channels (ReLU), whose outputs are concatenated into one
// 8-channel feature map. Branch b of thread t runs as sub-thread b on PUs
// 8t+2b and 8t+2b+1, one pixel per lane (16 pixels). The shared weight banks are
// split four ways (banks 6..9 become W0..W3), so every branch fetches its own
// weights while the others compute. Each PU gets the whole input tile of its
// pixels, runs one K = C reduction per output channel, and the branch results are
// stored interleaved as pixel-major rows of the concatenated map.
//
// Checks every output word against a model, that all four branches of a thread
// computed at the same time, that both threads computed at the same time, that
// each thread stalled, and that the weight banks were split. Uses a 16-PU array
// with small buffers so it finishes quickly.
module tb_sna_wl_inception;
  import sna_pkg::*;
  localparam int unsigned NPU = 16, NL = LANES;
  localparam int C = 8, NPIX = 16, CTOT = 8;
  localparam int CB [4] = '{2, 3, 2, 1};
  localparam int CO [4] = '{0, 2, 5, 7};   // channel offset of each branch

  logic clk = 0, rst_n = 0;
  logic imem_we = 0, imem_tid = 0, start = 0, done;
  logic [7:0] imem_addr = 0;
  instr_t imem_wdata = '0;
  logic ext_req = 0, ext_we = 0, ext_gnt, ext_rvalid, fbmu_err;
  logic [BANK_W-1:0] ext_bank = 0;
  logic [GOFF_W-1:0] ext_addr = 0;
  data_t ext_wdata = 0, ext_rdata;

  int checks = 0, failures = 0, cycles = 0;
  int n_four [2], n_both = 0, n_stall [2], n_split = 0, n_conflict = 0;

  sna_top #(.NPU(NPU), .WWORDS(256), .IWORDS(64), .BWORDS(1024)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && start === 0 && !done) begin
    cycles++;
    for (int t = 0; t < 2; t++) begin
      if (dut.pu_busy[8*t] && dut.pu_busy[8*t+2] && dut.pu_busy[8*t+4] && dut.pu_busy[8*t+6])
        n_four[t]++;
      if (dut.stall[t]) n_stall[t]++;
    end
    if (|dut.pu_busy[7:0] && |dut.pu_busy[15:8]) n_both++;
    if (dut.bank_we && dut.bank_lbuf != LB_W0) n_split++;
    if (dut.conflict) n_conflict++;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  instr_t prog [2][$];

  function automatic instr_t I(op_e op, int stid = 0, lbuf_e lb = LB_NONE, int lane = 0,
                               int a = 0, int b = 0, int c = 0, int len = 0, int stride = 0,
                               int flags = 0);
    instr_t x;
    x = '0; x.op = op; x.stid = 2'(stid); x.lbuf = lb; x.lane = 4'(lane); x.a = GADDR_W'(a);
    x.b = LADDR_W'(b); x.c = LADDR_W'(c); x.len = LEN_W'(len); x.stride = GADDR_W'(stride);
    x.flags = FLAGS_W'(flags);
    return x;
  endfunction

  data_t Wt [4][CTOT * C];        // branch b, output channel o, input channel c: [o*C+c]
  data_t X [2][NPIX * C];         // image of each sub-network, pixel-major

  initial begin
    lbuf_e wl [4];
    lbuf_e inb [2], outb [2];
    data_t d, e;
    wl = '{LB_W0, LB_W1, LB_W2, LB_W3};
    inb = '{LB_IN0, LB_IN1};
    outb = '{LB_OUT0, LB_OUT1};
    for (int t = 0; t < 2; t++) begin n_four[t] = 0; n_stall[t] = 0; end
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < CTOT * C; i++) Wt[b][i] = data_t'($urandom_range(0, 128) - 64);
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < NPIX * C; i++) X[t][i] = data_t'($urandom_range(0, 512) - 256);

    for (int t = 0; t < 2; t++) begin
      // both threads write the same split, so neither depends on the other's timing
      for (int b = 1; b < 4; b++) prog[t].push_back(I(OP_CFGBANK, .b(6 + b), .lb(wl[b])));
      for (int b = 0; b < 4; b++) prog[t].push_back(I(OP_CFGPU, .stid(b), .b(8 * t + 2 * b), .len(2)));
      for (int b = 0; b < 4; b++) begin
        prog[t].push_back(I(OP_LDW, .stid(b), .lb(wl[b]), .a(0), .b(0), .len(CB[b] * C)));
        for (int l = 0; l < int'(NL); l++)
          prog[t].push_back(I(OP_LDI, .stid(b), .lb(inb[t]), .lane(l), .a(l * C), .stride(NL * C), .b(0), .len(C)));
      end
      for (int o = 0; o < 3; o++)
        for (int b = 0; b < 4; b++)
          if (o < CB[b])
            prog[t].push_back(I(OP_RUN, .stid(b), .b(o * C), .c(0), .a(o), .len(C), .flags(1 << F_RELU)));
      for (int b = 0; b < 4; b++)
        for (int l = 0; l < int'(NL); l++)
          prog[t].push_back(I(OP_STO, .stid(b), .lb(outb[t]), .lane(l), .a(l * CTOT + CO[b]),
                              .stride(NL * CTOT), .b(0), .len(CB[b])));
      prog[t].push_back(I(OP_SYNC));
      prog[t].push_back(I(OP_HALT));
    end

    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < CB[b] * C; i++) ext_write(6 + b, i, Wt[b][i]);
    for (int i = 0; i < NPIX * C; i++) begin ext_write(0, i, X[0][i]); ext_write(10, i, X[1][i]); end
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
      for (int b = 0; b < 4; b++)
        for (int o = 0; o < CB[b]; o++)
          for (int p = 0; p < NPIX; p++) begin
            acc_t s;
            s = 0;
            for (int c = 0; c < C; c++) s += acc_t'(Wt[b][o * C + c]) * acc_t'(X[t][p * C + c]);
            e = sat_q(s);
            if (e < 0) e = 0;
            ext_read(t ? 12 : 2, p * CTOT + CO[b] + o, d);
            chk(d === e, $sformatf("sub-network %0d pixel %0d channel %0d: %0d exp %0d",
                                   t, p, CO[b] + o, d, e));
          end

    $display("cycles=%0d four-branch cycles t0=%0d t1=%0d both threads=%0d stalls t0=%0d t1=%0d splits=%0d conflicts=%0d",
             cycles, n_four[0], n_four[1], n_both, n_stall[0], n_stall[1], n_split, n_conflict);
    chk(n_four[0] > 0 && n_four[1] > 0, "four branches of each thread computed at once");
    chk(n_both > 0, "both sub-networks computed at once");
    chk(n_stall[0] > 0 && n_stall[1] > 0, "both threads stalled");
    chk(n_split == 6, "weight banks split four ways by both threads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
