// tb_sna_top_body: the end-to-end siamese test shared by tb_sna_top (small array)
// and tb_sna_top_full (default sizes). See tb_sna_top for what it does. With
// FULL set, the top is instantiated with no parameter overrides and the test uses
// the defaults; the workload itself uses PUs 0..7 of the array, and thread 0 parks
// the rest in a sub-thread that is never run.
module tb_sna_top_body
  import sna_pkg::*;
#(
  parameter int unsigned NPU    = N_PU,
  parameter int unsigned WWORDS = WBUF_WORDS,
  parameter int unsigned IWORDS = IOB_WORDS,
  parameter int unsigned BWORDS = GB_WORDS,
  parameter bit          FULL   = 0
) ();
  localparam int unsigned NL = LANES;
  localparam int K = 16;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0, imem_tid = 0, start = 0, done;
  logic [7:0] imem_addr = 0;
  instr_t imem_wdata = '0;
  logic ext_req = 0, ext_we = 0, ext_gnt, ext_rvalid, fbmu_err;
  logic [BANK_W-1:0] ext_bank = 0;
  logic [GOFF_W-1:0] ext_addr = 0;
  data_t ext_wdata = 0, ext_rdata;

  int checks = 0, failures = 0;
  int n_conflict = 0, n_stall0 = 0, n_stall1 = 0, n_subthr = 0, n_both = 0;
  int n_fwd_wait = 0, n_fwd_xfer = 0, n_swap = 0, n_split = 0, n_pool = 0, n_relu = 0;
  int n_psum_st = 0, n_psum_ld = 0;
  int cycles = 0;

  if (FULL) begin : g_full
    sna_top dut (.*);
  end else begin : g_small
    sna_top #(.NPU(NPU), .WWORDS(WWORDS), .IWORDS(IWORDS), .BWORDS(BWORDS)) dut (.*);
  end

  // hierarchical taps into whichever top was built
  logic conflict_t, stall_t [2], run_t_iss, swap_t;
  logic [NPU-1:0] busy_t;
  logic fwdv [8], fwdr [8];
  logic src_wait [8];
  logic [FLAGS_W-1:0] runflags;
  logic bank_we_t;
  lbuf_e bank_lbuf_t;
  logic mv_v_t;
  mv_e mv_kind_t;
  if (FULL) begin : g_tap_full
    assign conflict_t = g_full.dut.conflict;
    assign stall_t    = g_full.dut.stall;
    assign busy_t     = g_full.dut.pu_busy;
    assign run_t_iss  = g_full.dut.run_issue;
    assign swap_t     = g_full.dut.swap_issue;
    assign runflags   = g_full.dut.run.flags;
    assign bank_we_t  = g_full.dut.bank_we;
    assign bank_lbuf_t = g_full.dut.bank_lbuf;
    assign mv_v_t     = g_full.dut.mv_valid[0] || g_full.dut.mv_valid[1];
    assign mv_kind_t  = g_full.dut.mv.kind;
    for (genvar i = 0; i < 8; i++) begin : g_f
      assign fwdv[i] = g_full.dut.fwd_v[i];
      assign fwdr[i] = g_full.dut.fwd_r[i];
      assign src_wait[i] = g_full.dut.g_pu[i].u_pu.state == 2'd1 && g_full.dut.g_pu[i].u_pu.src_f &&
                           !g_full.dut.g_pu[i].u_pu.hold_v;
    end
  end else begin : g_tap_small
    assign conflict_t = g_small.dut.conflict;
    assign stall_t    = g_small.dut.stall;
    assign busy_t     = g_small.dut.pu_busy;
    assign run_t_iss  = g_small.dut.run_issue;
    assign swap_t     = g_small.dut.swap_issue;
    assign runflags   = g_small.dut.run.flags;
    assign bank_we_t  = g_small.dut.bank_we;
    assign bank_lbuf_t = g_small.dut.bank_lbuf;
    assign mv_v_t     = g_small.dut.mv_valid[0] || g_small.dut.mv_valid[1];
    assign mv_kind_t  = g_small.dut.mv.kind;
    for (genvar i = 0; i < 8; i++) begin : g_s
      assign fwdv[i] = g_small.dut.fwd_v[i];
      assign fwdr[i] = g_small.dut.fwd_r[i];
      assign src_wait[i] = g_small.dut.g_pu[i].u_pu.state == 2'd1 && g_small.dut.g_pu[i].u_pu.src_f &&
                           !g_small.dut.g_pu[i].u_pu.hold_v;
    end
  end

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && start === 0 && !done) begin
    cycles++;
    if (conflict_t) n_conflict++;
    if (stall_t[0]) n_stall0++;
    if (stall_t[1]) n_stall1++;
    if (|busy_t[1:0] && |busy_t[3:2]) n_subthr++;
    if (|busy_t[3:0] && |busy_t[7:4]) n_both++;
    if (fwdv[4] && fwdr[4]) n_fwd_xfer++;
    for (int i = 0; i < 8; i++) if (src_wait[i]) n_fwd_wait++;
    if (swap_t) n_swap++;
    if (bank_we_t && bank_lbuf_t != LB_W0) n_split++;
    if (run_t_iss && runflags[F_POOL0 +: 2] != 0) n_pool++;
    if (run_t_iss && runflags[F_RELU]) n_relu++;
    if (mv_v_t && mv_kind_t == MV_STP) n_psum_st++;
    if (mv_v_t && mv_kind_t == MV_LDP) n_psum_ld++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
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

  // ---------------- program building ----------------
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

  localparam int FR = 1 << F_RELU, FW = 1 << F_FWD, FS = 1 << F_SRCF, FP2 = 1 << F_POOL0;
  localparam int FA = 1 << F_ACC, FPS = 1 << F_PSUM;

  // ---------------- data ----------------
  data_t A [K], B [K];
  data_t X0 [4][NL][K], X1 [4][NL][K];

  function automatic data_t relu(data_t v); return v < 0 ? data_t'(0) : v; endfunction
  function automatic data_t dot(data_t w [K], int wb, data_t x [K], int xb, int n);
    acc_t s;
    s = 0;
    for (int i = 0; i < n; i++) s += acc_t'(w[wb + i]) * acc_t'(x[xb + i]);
    return sat_q(s);
  endfunction

  initial begin
    data_t d, e;
    data_t y01 [2][NL], z [2][NL], v1 [NL], v2 [NL];
    for (int i = 0; i < K; i++) begin
      A[i] = data_t'($urandom_range(0, 128) - 64);
      B[i] = data_t'($urandom_range(0, 128) - 64);
    end
    for (int p = 0; p < 4; p++)
      for (int l = 0; l < int'(NL); l++)
        for (int i = 0; i < K; i++) begin
          X0[p][l][i] = data_t'($urandom_range(0, 512) - 256);
          X1[p][l][i] = data_t'($urandom_range(0, 512) - 256);
        end

    // thread 0: sub-network 0, branch 0 on PUs 0-1, branch 1 on PUs 2-3
    // park every PU from 4 up in an unused sub-thread; thread 1 then claims 4-7
    prog[0].push_back(I(OP_CFGPU, .stid(3), .b(4), .len(NPU - 4)));
    prog[0].push_back(I(OP_CFGPU, .stid(0), .b(0), .len(2)));
    prog[0].push_back(I(OP_CFGPU, .stid(1), .b(2), .len(2)));
    prog[0].push_back(I(OP_CFGBANK, .b(7), .lb(LB_W1)));      // split: bank 7 -> branch 1 weights
    prog[0].push_back(I(OP_LDW, .stid(0), .lb(LB_W0), .a(0), .b(0), .len(K)));
    prog[0].push_back(I(OP_LDW, .stid(1), .lb(LB_W1), .a(0), .b(0), .len(K)));
    for (int l = 0; l < int'(NL); l++) begin
      prog[0].push_back(I(OP_LDI, .stid(0), .lb(LB_IN0), .lane(l), .a(l * K), .stride(NL * K), .b(0), .len(K)));
      prog[0].push_back(I(OP_LDI, .stid(1), .lb(LB_IN0), .lane(l), .a(2 * NL * K + l * K), .stride(NL * K), .b(0), .len(K)));
    end
    prog[0].push_back(I(OP_RUN, .stid(0), .b(0), .c(0), .a(0), .len(K), .flags(FR)));
    prog[0].push_back(I(OP_RUN, .stid(1), .b(0), .c(0), .a(0), .len(K), .flags(FP2)));
    prog[0].push_back(I(OP_SYNC));
    for (int l = 0; l < int'(NL); l++)
      prog[0].push_back(I(OP_STO, .stid(0), .lb(LB_OUT0), .lane(l), .a(l), .stride(8), .b(0), .len(1)));
    for (int l = 0; l < int'(NL) / 2; l++)
      prog[0].push_back(I(OP_STO, .stid(1), .lb(LB_OUT0), .lane(l), .a(16 + l), .stride(8), .b(0), .len(1)));
    // receive two vectors from thread 1 on PU 3 (its weights are branch 1's)
    prog[0].push_back(I(OP_CFGPU, .stid(2), .b(3), .len(1)));
    prog[0].push_back(I(OP_RUN, .stid(2), .b(0), .a(1), .len(2), .flags(FS)));
    // next layer on branch 0: inputs are the previous outputs
    prog[0].push_back(I(OP_SWAP, .stid(0)));
    prog[0].push_back(I(OP_RUN, .stid(0), .b(2), .c(0), .a(5), .len(1)));
    prog[0].push_back(I(OP_SYNC));
    for (int l = 0; l < int'(NL); l++) begin
      prog[0].push_back(I(OP_STO, .stid(2), .lb(LB_OUT0), .lane(l), .a(32 + l), .b(1), .len(1)));
      prog[0].push_back(I(OP_STO, .stid(0), .lb(LB_OUT0), .lane(l), .a(48 + l), .stride(8), .b(5), .len(1)));
    end
    prog[0].push_back(I(OP_HALT));

    // thread 1: sub-network 1 on PUs 4-7 with the shared weights
    prog[1].push_back(I(OP_CFGPU, .stid(0), .b(4), .len(4)));
    prog[1].push_back(I(OP_LDW, .stid(0), .lb(LB_W0), .a(0), .b(0), .len(K)));
    for (int l = 0; l < int'(NL); l++)
      prog[1].push_back(I(OP_LDI, .stid(0), .lb(LB_IN1), .lane(l), .a(l * K), .stride(NL * K), .b(0), .len(K)));
    prog[1].push_back(I(OP_RUN, .stid(0), .b(0), .c(0), .a(0), .len(K), .flags(FR)));
    prog[1].push_back(I(OP_SYNC));
    for (int l = 0; l < int'(NL); l++)
      prog[1].push_back(I(OP_STO, .stid(0), .lb(LB_OUT1), .lane(l), .a(l), .stride(8), .b(0), .len(1)));
    // PU 4 sends two vectors to PU 3 of the other sub-network
    prog[1].push_back(I(OP_CFGPU, .stid(1), .b(4), .len(1)));
    prog[1].push_back(I(OP_RUN, .stid(1), .b(0), .c(0), .a(2), .len(K), .flags(FW)));
    prog[1].push_back(I(OP_RUN, .stid(1), .b(4), .c(8), .a(3), .len(8), .flags(FW | FR)));
    prog[1].push_back(I(OP_SYNC));
    // PUs 5-7: a reduction split in two halves, the partial sum parked in the
    // global buffer (FOB slot 5 -> OUT1 -> FOB slot 6) between them
    prog[1].push_back(I(OP_RUN, .stid(0), .lane(5), .b(0), .c(0), .len(K / 2), .flags(FPS)));
    for (int l = 0; l < int'(NL); l++)
      prog[1].push_back(I(OP_STP, .stid(0), .lb(LB_OUT1), .lane(l), .a(64 + 2 * l), .stride(16), .b(10), .len(2)));
    for (int l = 0; l < int'(NL); l++)
      prog[1].push_back(I(OP_LDP, .stid(0), .lb(LB_OUT1), .lane(l), .a(64 + 2 * l), .stride(16), .b(12), .len(2)));
    prog[1].push_back(I(OP_RUN, .stid(0), .lane(6), .b(K / 2), .c(K / 2), .a(4), .len(K / 2), .flags(FA)));
    prog[1].push_back(I(OP_SYNC));
    for (int l = 0; l < int'(NL); l++)
      prog[1].push_back(I(OP_STO, .stid(0), .lb(LB_OUT1), .lane(l), .a(192 + l), .stride(8), .b(4), .len(1)));
    prog[1].push_back(I(OP_HALT));

    repeat (2) @(posedge clk); #1 rst_n = 1;
    // global buffer contents (reset layout: IN0 bank 0, W bank 6/7, IN1 bank 10)
    for (int i = 0; i < K; i++) begin ext_write(6, i, A[i]); ext_write(7, i, B[i]); end
    for (int p = 0; p < 4; p++)
      for (int l = 0; l < int'(NL); l++)
        for (int i = 0; i < K; i++) begin
          ext_write(0, p * NL * K + l * K + i, X0[p][l][i]);
          ext_write(10, p * NL * K + l * K + i, X1[p][l][i]);
        end
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < prog[t].size(); a++) begin
        imem_we = 1; imem_tid = 1'(t); imem_addr = 8'(a); imem_wdata = prog[t][a];
        @(posedge clk); #1;
      end
    imem_we = 0;
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin @(posedge clk); #1; end
    $display("run took %0d cycles", cycles);
    chk(!fbmu_err, "no unmapped buffer access");

    // ---------------- results ----------------
    for (int p = 0; p < 2; p++)
      for (int l = 0; l < int'(NL); l++) begin
        y01[p][l] = relu(dot(A, 0, X0[p][l], 0, K));
        ext_read(2, p * 8 + l, d);
        chk(d === y01[p][l], $sformatf("branch 0 PU %0d lane %0d: %0d exp %0d", p, l, d, y01[p][l]));
      end
    for (int p = 2; p < 4; p++) begin
      for (int l = 0; l < int'(NL); l++) z[p-2][l] = dot(B, 0, X0[p][l], 0, K);
      for (int g = 0; g < int'(NL) / 2; g++) begin
        e = z[p-2][2*g] > z[p-2][2*g+1] ? z[p-2][2*g] : z[p-2][2*g+1];
        ext_read(2, 16 + (p - 2) * 8 + g, d);
        chk(d === e, $sformatf("branch 1 PU %0d pool %0d: %0d exp %0d", p, g, d, e));
      end
    end
    for (int p = 0; p < 4; p++)
      for (int l = 0; l < int'(NL); l++) begin
        e = relu(dot(A, 0, X1[p][l], 0, K));
        ext_read(12, p * 8 + l, d);
        chk(d === e, $sformatf("sub-network 1 PU %0d lane %0d: %0d exp %0d", p + 4, l, d, e));
      end
    for (int l = 0; l < int'(NL); l++) begin
      acc_t s;
      v1[l] = dot(A, 0, X1[0][l], 0, K);
      v2[l] = relu(dot(A, 4, X1[0][l], 8, 8));
      s = acc_t'(B[0]) * acc_t'(v1[l]) + acc_t'(B[1]) * acc_t'(v2[l]);
      e = sat_q(s);
      ext_read(2, 32 + l, d);
      chk(d === e, $sformatf("forwarded PU 3 lane %0d: %0d exp %0d", l, d, e));
    end
    for (int p = 0; p < 2; p++)
      for (int l = 0; l < int'(NL); l++) begin
        e = sat_q(acc_t'(A[2]) * acc_t'(y01[p][l]));
        ext_read(2, 48 + p * 8 + l, d);
        chk(d === e, $sformatf("after swap PU %0d lane %0d: %0d exp %0d", p, l, d, e));
      end

    for (int m = 0; m < 3; m++)
      for (int l = 0; l < int'(NL); l++) begin
        acc_t s;
        data_t lo, hi;
        s = 0;
        for (int i = 0; i < K / 2; i++) s += acc_t'(A[i]) * acc_t'(X1[m + 1][l][i]);
        ext_read(12, 64 + m * 16 + 2 * l, lo);
        ext_read(12, 64 + m * 16 + 2 * l + 1, hi);
        chk({hi, lo} === s, $sformatf("parked partial sum PU %0d lane %0d", m + 5, l));
        e = dot(A, 0, X1[m + 1][l], 0, K);
        ext_read(12, 192 + m * 8 + l, d);
        chk(d === e, $sformatf("reduction over parked psum PU %0d lane %0d: %0d exp %0d", m + 5, l, d, e));
      end

    $display("bank conflicts=%0d stalls t0=%0d t1=%0d concurrent branches=%0d concurrent threads=%0d",
             n_conflict, n_stall0, n_stall1, n_subthr, n_both);
    $display("forward waits=%0d transfers=%0d swaps=%0d bank splits=%0d pool runs=%0d relu runs=%0d",
             n_fwd_wait, n_fwd_xfer, n_swap, n_split, n_pool, n_relu);
    $display("partial-sum stores=%0d loads=%0d", n_psum_st, n_psum_ld);
    chk(n_conflict > 0, "bank conflict happened");
    chk(n_stall0 > 0 && n_stall1 > 0, "both threads stalled");
    chk(n_subthr > 0, "two sub-threads computed at once");
    chk(n_both > 0, "two main threads computed at once");
    chk(n_fwd_xfer == 2, "two forward transfers");
    chk(n_fwd_wait > 0, "consumer waited on forward link");
    chk(n_swap == 1, "one role swap");
    chk(n_split == 1, "weight buffer split");
    chk(n_pool > 0 && n_relu > 0, "pooling and activation used");
    chk(n_psum_st > 0 && n_psum_ld > 0, "partial sums parked in the global buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
