// sna_cp: control processor (CP) of the SNA accelerator.
//
// The CP runs two instruction streams at once, one per main thread (sub-network 0
// and 1 of the siamese network), in simultaneous-multithreading fashion. Each
// thread has its own program memory (loaded by the host through imem_*) and
// program counter. Every cycle the CP checks whether each running thread's current
// instruction can issue, and issues one of the ready ones, alternating between the
// threads when both are ready (round-robin). An instruction that must wait holds
// its thread (stall) while the other thread keeps issuing.
//
// Issue rules:  CFGBANK, CFGPU, NOP    always
//               LDW, LDI, LDP          the thread's data mover is idle
//               STO, STP, RUN, SWAP    the target sub-thread's PUs and the thread's
//                                      data mover are idle (earlier loads done,
//                                      results to be stored written)
//               SYNC                   mover and all of the thread's PUs idle
//               HALT                   always; the thread stops
// start restarts both threads at address 0; done is high when both have halted.
// Issued work leaves on the cfg/run/mv outputs in the issue cycle. The existence
// of the CP, its instruction-driven control and the two main threads follow the
// document; the instruction set, the issue rules and the arbitration are this
// design's own.
module sna_cp
  import sna_pkg::*;
#(
  parameter int unsigned IMEM_D = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // program load
  input  logic                      imem_we,
  input  logic                      imem_tid,
  input  logic [$clog2(IMEM_D)-1:0] imem_addr,
  input  instr_t                    imem_wdata,
  input  logic                      start,
  output logic                      done,
  // status of the resources
  input  logic                      mv_busy  [N_TID],
  input  logic                      grp_busy [N_TID][N_STID],
  input  logic                      thr_busy [N_TID],
  // issue: bank table
  output logic                      bank_we,
  output logic [BANK_W-1:0]         bank_sel,
  output lbuf_e                     bank_lbuf,
  // issue: PU table
  output logic                      pu_cfg_we,
  output logic                      iss_tid,
  output logic [1:0]                iss_stid,
  output logic [LADDR_W-1:0]        pu_cfg_base,
  output logic [LEN_W-1:0]          pu_cfg_cnt,
  // issue: PU work
  output logic                      run_issue,
  output logic                      swap_issue,
  output run_t                      run,
  // issue: data mover of each thread
  output logic                      mv_valid [N_TID],
  output mv_t                       mv,
  // per-thread stall pulse (running, not issued)
  output logic                      stall [N_TID]
);

  instr_t                    imem [N_TID][IMEM_D];
  logic [$clog2(IMEM_D)-1:0] pc   [N_TID];
  logic                      act  [N_TID];
  logic                      rdy  [N_TID];
  instr_t                    ci   [N_TID];
  logic                      last;      // thread issued last time both were ready
  logic                      sel;
  logic                      go;
  instr_t                    ii;

  always_ff @(posedge clk)
    if (imem_we) imem[imem_tid][imem_addr] <= imem_wdata;

  always_comb begin
    for (int t = 0; t < int'(N_TID); t++) begin
      ci[t] = imem[t][pc[t]];
      unique case (ci[t].op)
        OP_LDW, OP_LDI,
        OP_LDP:           rdy[t] = act[t] && !mv_busy[t];
        OP_STO, OP_STP,
        OP_RUN, OP_SWAP:  rdy[t] = act[t] && !mv_busy[t] && !grp_busy[t][ci[t].stid];
        OP_SYNC:          rdy[t] = act[t] && !mv_busy[t] && !thr_busy[t];
        default:          rdy[t] = act[t];
      endcase
    end
    go  = rdy[0] || rdy[1];
    sel = (rdy[0] && rdy[1]) ? ~last : rdy[1];
    ii  = ci[sel];
    for (int t = 0; t < int'(N_TID); t++) stall[t] = act[t] && !(go && sel == 1'(t));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      last <= 1'b1;
      for (int t = 0; t < int'(N_TID); t++) begin
        pc[t]  <= '0;
        act[t] <= 1'b0;
      end
    end else if (start) begin
      for (int t = 0; t < int'(N_TID); t++) begin
        pc[t]  <= '0;
        act[t] <= 1'b1;
      end
    end else if (go) begin
      if (rdy[0] && rdy[1]) last <= sel;
      if (ii.op == OP_HALT) act[sel] <= 1'b0;
      else                  pc[sel]  <= pc[sel] + 1'b1;
    end

  assign done = !act[0] && !act[1];

  // ---------------- issue ----------------
  always_comb begin
    iss_tid     = sel;
    iss_stid    = ii.stid;
    bank_we     = go && ii.op == OP_CFGBANK;
    bank_sel    = BANK_W'(ii.b);
    bank_lbuf   = ii.lbuf;
    pu_cfg_we   = go && ii.op == OP_CFGPU;
    pu_cfg_base = ii.b;
    pu_cfg_cnt  = ii.len;
    run_issue   = go && ii.op == OP_RUN;
    swap_issue  = go && ii.op == OP_SWAP;
    run.flags   = ii.flags;
    run.wbase   = ii.b;
    run.ibase   = ii.c;
    run.obase   = LADDR_W'(ii.a);
    run.k       = ii.len;
    run.slot    = ii.lane;
    unique case (ii.op)
      OP_LDW:  mv.kind = MV_LDW;
      OP_LDI:  mv.kind = MV_LDI;
      OP_LDP:  mv.kind = MV_LDP;
      OP_STP:  mv.kind = MV_STP;
      default: mv.kind = MV_STO;
    endcase
    mv.lbuf     = ii.lbuf;
    mv.lane     = ii.lane;
    mv.gaddr    = ii.a;
    mv.stride   = ii.stride;
    mv.laddr    = ii.b;
    mv.len      = ii.len;
    for (int t = 0; t < int'(N_TID); t++)
      mv_valid[t] = go && sel == 1'(t) &&
                    (ii.op == OP_LDW || ii.op == OP_LDI || ii.op == OP_STO ||
                     ii.op == OP_LDP || ii.op == OP_STP);
  end

endmodule
