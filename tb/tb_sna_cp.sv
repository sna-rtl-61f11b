// tb_sna_cp: checks the two-thread control processor. Each thread runs a short
// program; the testbench plays the data movers and PU groups (busy for a few
// cycles after each command). Checks that each thread issues its instructions in
// order and exactly once, that a waiting thread stalls while the other goes on,
// that ready threads alternate, that nothing issues against a busy resource
// (a store waits for its group's results),
// that the issued fields are decoded correctly, and that done follows both HALTs.
module tb_sna_cp;
  import sna_pkg::*;
  localparam int unsigned D = 16;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0, imem_tid = 0, start = 0, done;
  logic [$clog2(D)-1:0] imem_addr = 0;
  instr_t imem_wdata;
  logic mv_busy [N_TID], thr_busy [N_TID];
  logic grp_busy [N_TID][N_STID];
  logic bank_we, pu_cfg_we, iss_tid, run_issue, swap_issue;
  logic [BANK_W-1:0] bank_sel;
  lbuf_e bank_lbuf;
  logic [1:0] iss_stid;
  logic [LADDR_W-1:0] pu_cfg_base;
  logic [LEN_W-1:0] pu_cfg_cnt;
  run_t run;
  logic mv_valid [N_TID];
  mv_t mv;
  logic stall [N_TID];
  int checks = 0, failures = 0;

  sna_cp #(.IMEM_D(D)) dut (.*);
  always #5 clk = ~clk;

  instr_t prog [2][8];
  int nprog [2] = '{8, 5};
  int mvb [2], grb [2][4];
  int issued [2], both_ready_alt, nstall [2];
  int last_t = -1;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic instr_t mk(op_e op, int stid, int b, int len);
    instr_t i;
    i = '0; i.op = op; i.stid = 2'(stid); i.b = LADDR_W'(b); i.len = LEN_W'(len);
    i.lbuf = LB_W1; i.a = 19'd77; i.c = 12'd9; i.lane = 4'd2; i.flags = 7'h15; i.stride = 19'd3;
    return i;
  endfunction

  // resource models
  always_comb
    for (int t = 0; t < 2; t++) begin
      mv_busy[t] = mvb[t] > 0;
      thr_busy[t] = 0;
      for (int s = 0; s < 4; s++) begin grp_busy[t][s] = grb[t][s] > 0; thr_busy[t] |= grb[t][s] > 0; end
    end

  // issue monitor
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < 2; t++) begin
      if (mvb[t] > 0) mvb[t]--;
      for (int s = 0; s < 4; s++) if (grb[t][s] > 0) grb[t][s]--;
      if (stall[t] && !done) nstall[t]++;
    end
    if (bank_we || pu_cfg_we || run_issue || swap_issue || mv_valid[0] || mv_valid[1]) begin
      int t;
      instr_t e;
      t = iss_tid;
      e = prog[t][issued[t]];
      chk(issued[t] < nprog[t], "issue past program end");
      case (e.op)
        OP_CFGBANK: chk(bank_we && bank_sel == BANK_W'(e.b) && bank_lbuf == e.lbuf, "CFGBANK decode");
        OP_CFGPU:   chk(pu_cfg_we && pu_cfg_base == e.b && pu_cfg_cnt == e.len && iss_stid == e.stid, "CFGPU decode");
        OP_RUN: begin
          chk(run_issue && iss_stid == e.stid && run.k == e.len && run.wbase == e.b &&
              run.ibase == e.c && run.obase == LADDR_W'(e.a) && run.flags == e.flags && run.slot == e.lane,
              "RUN decode");
          chk(grb[t][e.stid] == 0, "RUN issued to a busy group");
          chk(mvb[t] == 0, "RUN issued while the mover is busy");
          grb[t][e.stid] = 4;
        end
        OP_LDW, OP_LDI, OP_STO, OP_LDP, OP_STP: begin
          chk(mv_valid[t] && !mv_valid[1-t] && mv.len == e.len && mv.laddr == e.b && mv.gaddr == e.a &&
              mv.stride == e.stride && mv.lbuf == e.lbuf && mv.lane == e.lane, "mover decode");
          chk(mv.kind == (e.op == OP_LDW ? MV_LDW : e.op == OP_LDI ? MV_LDI : e.op == OP_LDP ? MV_LDP :
                          e.op == OP_STP ? MV_STP : MV_STO), "mover kind");
          if (e.op == OP_STO || e.op == OP_STP) chk(grb[t][e.stid] == 0, "store issued while its group computes");
          chk(mvb[t] == 0, "mover command while busy");
          mvb[t] = 5;
        end
        default: chk(0, "unexpected issue");
      endcase
      if (last_t >= 0 && last_t != t) both_ready_alt++;
      last_t = t;
      issued[t]++;
    end
  end

  // SYNC / HALT are silent: follow them through the program counter
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < 2; t++)
      if (issued[t] < nprog[t] && (prog[t][issued[t]].op == OP_SYNC) && dut.pc[t] != 4'(issued[t])) begin
        chk(mvb[t] == 0 && grb[t][0] == 0 && grb[t][1] == 0, "SYNC before idle");
        issued[t]++;
      end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++) begin
      mvb[t] = 0; issued[t] = 0; nstall[t] = 0;
      for (int s = 0; s < 4; s++) grb[t][s] = 0;
    end
    both_ready_alt = 0;
    prog[0] = '{mk(OP_CFGBANK, 0, 6, 0), mk(OP_LDW, 1, 3, 8), mk(OP_LDI, 1, 4, 2), mk(OP_LDP, 1, 0, 2),
                mk(OP_RUN, 1, 5, 16), mk(OP_SYNC, 0, 0, 0), mk(OP_STP, 1, 0, 2), mk(OP_HALT, 0, 0, 0)};
    prog[1] = '{mk(OP_CFGPU, 2, 32, 8), mk(OP_RUN, 2, 1, 4), mk(OP_RUN, 2, 2, 4),
                mk(OP_STO, 2, 7, 5), mk(OP_HALT, 0, 0, 0), mk(OP_NOP, 0, 0, 0),
                mk(OP_NOP, 0, 0, 0), mk(OP_NOP, 0, 0, 0)};
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < 8; a++) begin
        imem_we = 1; imem_tid = 1'(t); imem_addr = 4'(a); imem_wdata = prog[t][a];
        @(posedge clk); #1;
      end
    imem_we = 0;
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin @(posedge clk); #1; end
    chk(issued[0] == 7 && issued[1] == 4, $sformatf("all issued (%0d,%0d)", issued[0], issued[1]));
    chk(nstall[0] > 0 && nstall[1] > 0, "both threads stalled at some point");
    chk(both_ready_alt >= 3, "threads interleaved");
    $display("stalls t0=%0d t1=%0d switches=%0d", nstall[0], nstall[1], both_ready_alt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
