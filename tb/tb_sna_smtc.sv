// tb_sna_smtc: checks the PU-to-thread table of the SMT controller: the reset
// split between the two main threads, re-partitioning into sub-threads (one per
// inception branch), dispatch of run/swap pulses to exactly one group, and group
// and thread busy derived from the PUs.
module tb_sna_smtc;
  import sna_pkg::*;
  localparam int unsigned NPU = N_PU;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_tid = 0, run_issue = 0, swap_issue = 0, iss_tid = 0;
  logic [1:0] cfg_stid = 0, iss_stid = 0;
  logic [LADDR_W-1:0] cfg_base = 0;
  logic [LEN_W-1:0] cfg_cnt = 0;
  logic [NPU-1:0] pu_start, pu_swap, pu_busy = '0, pu_tid;
  logic [NPU-1:0] grp_mask [N_TID][N_STID];
  logic grp_busy [N_TID][N_STID];
  logic thr_busy [N_TID];
  int checks = 0, failures = 0;
  int mt [NPU], ms [NPU];   // model table

  sna_smtc dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg(input int t, input int s, input int base, input int cnt);
    cfg_we = 1; cfg_tid = 1'(t); cfg_stid = 2'(s); cfg_base = LADDR_W'(base); cfg_cnt = LEN_W'(cnt);
    @(posedge clk); #1; cfg_we = 0;
    for (int i = base; i < base + cnt && i < int'(NPU); i++) begin mt[i] = t; ms[i] = s; end
  endtask

  task automatic check_all();
    for (int t = 0; t < 2; t++)
      for (int s = 0; s < 4; s++) begin
        logic [NPU-1:0] e;
        for (int i = 0; i < int'(NPU); i++) e[i] = (mt[i] == t && ms[i] == s);
        chk(grp_mask[t][s] == e, $sformatf("mask t%0d s%0d", t, s));
        run_issue = 1; iss_tid = 1'(t); iss_stid = 2'(s); #1;
        chk(pu_start == e && pu_swap == '0, "run dispatch");
        run_issue = 0; swap_issue = 1; #1;
        chk(pu_swap == e && pu_start == '0, "swap dispatch");
        swap_issue = 0; #1;
      end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < int'(NPU); i++) begin mt[i] = (i >= int'(NPU) / 2); ms[i] = 0; end
    check_all();
    // thread 0 split into four branches of unequal size, thread 1 into two
    cfg(0, 0, 0, 4); cfg(0, 1, 4, 12); cfg(0, 2, 16, 10); cfg(0, 3, 26, 6);
    cfg(1, 0, 32, 20); cfg(1, 1, 52, 12);
    check_all();
    // busy aggregation
    for (int t = 0; t < 20; t++) begin
      logic [NPU-1:0] b;
      b = {$urandom, $urandom};
      if (t % 4 == 0) b = '0;
      pu_busy = b; #1;
      for (int th = 0; th < 2; th++) begin
        logic tb_any;
        tb_any = 0;
        for (int s = 0; s < 4; s++) begin
          logic e;
          e = 0;
          for (int i = 0; i < int'(NPU); i++) if (mt[i] == th && ms[i] == s && b[i]) e = 1;
          chk(grp_busy[th][s] == e, "group busy");
          tb_any |= e;
        end
        chk(thr_busy[th] == tb_any, "thread busy");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
