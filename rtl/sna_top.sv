// sna_top: SNA, an accelerator that runs both sub-networks of a siamese network,
// and the branches of their hybrid (inception-style) layers, at the same time.
//
// Structure: a control processor (sna_cp) issues the instructions of two main
// threads; an SMT controller (sna_smtc) maps each PU to a main thread and a
// sub-thread and dispatches work orders to a group of PUs; one data mover per main
// thread (sna_dma) carries words between the global buffer and the PUs' private
// buffers (weights, IFmaps, OFmaps and FOB partial sums) through the buffer
// management unit (sna_fbmu), which maps the 16 banks of
// the global buffer (sna_gbuf) onto logical buffers and arbitrates bank access;
// the PU array (sna_pu) computes, each PU i also owning a one-way forward link
// to PU i-1 that carries results between neighbours (also between the last PU of
// one main thread and the first of the other).
//
// Interface: the host loads the two programs through imem_*, pulses start and
// waits for done. The off-chip memory is outside this design: its side of the
// global buffer is the ext_* port, which addresses a bank directly and competes for
// banks with the two movers. fbmu_err flags an access to an unmapped logical
// address. All sizes default to the main configuration (64 PUs x 8 lanes, 5 KB
// weight and 10 KB input/output buffer per PU, 16-bank 800 KB global buffer).
module sna_top
  import sna_pkg::*;
#(
  parameter int unsigned NPU    = N_PU,
  parameter int unsigned NL     = LANES,
  parameter int unsigned WWORDS = WBUF_WORDS,
  parameter int unsigned IWORDS = IOB_WORDS,
  parameter int unsigned NB     = GB_BANKS,
  parameter int unsigned BWORDS = GB_WORDS,
  parameter int unsigned IMEM_D = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // program load and control
  input  logic                      imem_we,
  input  logic                      imem_tid,
  input  logic [$clog2(IMEM_D)-1:0] imem_addr,
  input  instr_t                    imem_wdata,
  input  logic                      start,
  output logic                      done,
  // off-chip side of the global buffer
  input  logic                      ext_req,
  input  logic                      ext_we,
  input  logic [BANK_W-1:0]         ext_bank,
  input  logic [GOFF_W-1:0]         ext_addr,
  input  data_t                     ext_wdata,
  output logic                      ext_gnt,
  output logic                      ext_rvalid,
  output data_t                     ext_rdata,
  output logic                      fbmu_err
);

  localparam int unsigned PW = $clog2(NPU);

  // ---------------- control processor ----------------
  logic               mv_busy  [N_TID];
  logic               grp_busy [N_TID][N_STID];
  logic               thr_busy [N_TID];
  logic               bank_we;
  logic [BANK_W-1:0]  bank_sel;
  lbuf_e              bank_lbuf;
  logic               pu_cfg_we, iss_tid;
  logic [1:0]         iss_stid;
  logic [LADDR_W-1:0] pu_cfg_base;
  logic [LEN_W-1:0]   pu_cfg_cnt;
  logic               run_issue, swap_issue;
  run_t               run;
  logic               mv_valid [N_TID];
  mv_t                mv;
  logic               stall [N_TID];

  sna_cp #(.IMEM_D(IMEM_D)) u_cp (
    .clk, .rst_n, .imem_we, .imem_tid, .imem_addr, .imem_wdata, .start, .done,
    .mv_busy, .grp_busy, .thr_busy,
    .bank_we, .bank_sel, .bank_lbuf,
    .pu_cfg_we, .iss_tid, .iss_stid, .pu_cfg_base, .pu_cfg_cnt,
    .run_issue, .swap_issue, .run, .mv_valid, .mv, .stall
  );

  // ---------------- SMT controller ----------------
  logic [NPU-1:0] pu_start, pu_swap, pu_busy, pu_tid;
  logic [NPU-1:0] grp_mask [N_TID][N_STID];

  sna_smtc #(.NPU(NPU)) u_smtc (
    .clk, .rst_n,
    .cfg_we (pu_cfg_we), .cfg_tid (iss_tid), .cfg_stid (iss_stid),
    .cfg_base (pu_cfg_base), .cfg_cnt (pu_cfg_cnt),
    .run_issue, .swap_issue, .iss_tid, .iss_stid,
    .pu_start, .pu_swap, .pu_busy, .grp_mask, .grp_busy, .thr_busy, .pu_tid
  );

  // ---------------- data movers ----------------
  logic               g_req   [N_TID];
  logic               g_we    [N_TID];
  lbuf_e              g_lbuf  [N_TID];
  logic [GADDR_W-1:0] g_addr  [N_TID];
  data_t              g_wdata [N_TID];
  logic               g_gnt   [N_TID];
  logic               g_rvalid[N_TID];
  data_t              g_rdata [N_TID];
  logic [PW-1:0]      p_idx   [N_TID];
  logic               p_we    [N_TID];
  mv_e                p_kind  [N_TID];
  logic [3:0]         p_lane  [N_TID];
  logic [LADDR_W-1:0] p_addr  [N_TID];
  data_t              p_wdata [N_TID];
  logic               p_re    [N_TID];
  data_t              p_rdata [N_TID];
  data_t              st_data [NPU];

  for (genvar t = 0; t < int'(N_TID); t++) begin : g_mv
    sna_dma #(.NPU(NPU)) u_dma (
      .clk, .rst_n,
      .cmd_valid (mv_valid[t]), .cmd (mv), .cmd_mask (grp_mask[t][iss_stid]),
      .busy      (mv_busy[t]),
      .g_req (g_req[t]), .g_we (g_we[t]), .g_lbuf (g_lbuf[t]), .g_addr (g_addr[t]),
      .g_wdata (g_wdata[t]), .g_gnt (g_gnt[t]), .g_rvalid (g_rvalid[t]),
      .g_rdata (g_rdata[t]),
      .p_idx (p_idx[t]), .p_we (p_we[t]), .p_kind (p_kind[t]), .p_lane (p_lane[t]),
      .p_addr (p_addr[t]), .p_wdata (p_wdata[t]), .p_re (p_re[t]),
      .p_rdata (p_rdata[t])
    );
    // the addressed PU answers a store read the next cycle
    logic [PW-1:0] idx_q;
    always_ff @(posedge clk) idx_q <= p_idx[t];
    assign p_rdata[t] = st_data[idx_q];
  end

  // ---------------- buffer management unit and global buffer ----------------
  logic                      b_en    [NB];
  logic                      b_we    [NB];
  logic [$clog2(BWORDS)-1:0] b_addr  [NB];
  data_t                     b_wdata [NB];
  data_t                     b_rdata [NB];
  lbuf_e                     bank_map [NB];
  logic                      conflict;

  sna_fbmu #(.NB(NB), .WORDS(BWORDS), .NLP(N_TID)) u_fbmu (
    .clk, .rst_n,
    .cfg_we (bank_we), .cfg_bank (bank_sel), .cfg_lbuf (bank_lbuf), .map (bank_map),
    .lp_req (g_req), .lp_we (g_we), .lp_lbuf (g_lbuf), .lp_addr (g_addr),
    .lp_wdata (g_wdata), .lp_gnt (g_gnt), .lp_rvalid (g_rvalid), .lp_rdata (g_rdata),
    .ext_req, .ext_we, .ext_bank, .ext_addr, .ext_wdata, .ext_gnt, .ext_rvalid,
    .ext_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata,
    .err (fbmu_err), .conflict
  );

  sna_gbuf #(.NB(NB), .WORDS(BWORDS)) u_gbuf (
    .clk, .en (b_en), .we (b_we), .addr (b_addr), .wdata (b_wdata), .rdata (b_rdata)
  );

  // ---------------- PU array with forward links ----------------
  // link i carries the output of PU i to PU i-1; PU 0's output leaves the array
  logic  fwd_v [NPU+1];
  logic  fwd_r [NPU+1];
  data_t fwd_d [NPU+1][NL];

  assign fwd_v[NPU] = 1'b0;
  assign fwd_r[0]   = 1'b1;
  for (genvar l = 0; l < int'(NL); l++) begin : g_fz
    assign fwd_d[NPU][l] = '0;
  end

  for (genvar i = 0; i < int'(NPU); i++) begin : g_pu
    logic t;
    logic wr_en;
    assign t     = pu_tid[i];
    assign wr_en = p_we[t] && p_idx[t] == PW'(i);
    sna_pu #(.N(NL), .WWORDS(WWORDS), .IWORDS(IWORDS)) u_pu (
      .clk, .rst_n,
      .start (pu_start[i]), .run (run), .swap (pu_swap[i]), .busy (pu_busy[i]),
      .wr_en (wr_en), .wr_kind (p_kind[t]), .wr_lane ($clog2(NL)'(p_lane[t])),
      .wr_addr (p_addr[t]), .wr_data (p_wdata[t]),
      .st_en (p_re[t] && p_idx[t] == PW'(i)), .st_lane ($clog2(NL)'(p_lane[t])),
      .st_addr (p_addr[t]), .st_data (st_data[i]),
      .fwd_in_valid (fwd_v[i+1]), .fwd_in_ready (fwd_r[i+1]), .fwd_in_data (fwd_d[i+1]),
      .fwd_out_valid (fwd_v[i]), .fwd_out_ready (fwd_r[i]), .fwd_out_data (fwd_d[i])
    );
  end

endmodule
