// sna_fbmu: flexible on-chip buffer management unit (FBMU).
//
// The FBMU keeps a table that assigns every global-buffer bank to a logical buffer
// (input or output buffer of sub-network 0 or 1, a shared weight buffer, or one
// weight buffer per branch). Reset loads the siamese layout: banks 0-1 input
// buffer 0, 2-5 output buffer 0, 6-9 weight buffer, 10-11 input buffer 1, 12-15
// output buffer 1 (scaled proportionally for other bank counts). Instructions
// rewrite entries one bank at a time (cfg_*), e.g. to split banks 6-9 into four
// branch weight buffers for an inception module.
//
// NLP logical ports (one per main thread) address {logical buffer, rank, offset}:
// the request goes to the rank-th bank, in bank order, that is mapped to that
// logical buffer. A request that matches no bank is granted at once, reads zero and
// sets the sticky err flag. A physical port (ext_*, the off-chip side) addresses a
// bank directly. Each bank has a round-robin arbiter over all ports; requests to
// different banks are served in the same cycle. gnt is combinational in the
// request cycle; read data comes with rvalid one cycle later. conflict pulses when
// some bank had more than one requester. The table-based bank splitting follows
// the document; address format, arbitration policy and port set are this design's.
module sna_fbmu
  import sna_pkg::*;
#(
  parameter int unsigned NB    = GB_BANKS,
  parameter int unsigned WORDS = GB_WORDS,
  parameter int unsigned NLP   = N_TID
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // table configuration
  input  logic                     cfg_we,
  input  logic [BANK_W-1:0]        cfg_bank,
  input  lbuf_e                    cfg_lbuf,
  output lbuf_e                    map [NB],
  // logical ports
  input  logic                     lp_req   [NLP],
  input  logic                     lp_we    [NLP],
  input  lbuf_e                    lp_lbuf  [NLP],
  input  logic [GADDR_W-1:0]       lp_addr  [NLP],
  input  data_t                    lp_wdata [NLP],
  output logic                     lp_gnt   [NLP],
  output logic                     lp_rvalid[NLP],
  output data_t                    lp_rdata [NLP],
  // physical (off-chip side) port
  input  logic                     ext_req,
  input  logic                     ext_we,
  input  logic [BANK_W-1:0]        ext_bank,
  input  logic [GOFF_W-1:0]        ext_addr,
  input  data_t                    ext_wdata,
  output logic                     ext_gnt,
  output logic                     ext_rvalid,
  output data_t                    ext_rdata,
  // bank side
  output logic                     b_en    [NB],
  output logic                     b_we    [NB],
  output logic [$clog2(WORDS)-1:0] b_addr  [NB],
  output data_t                    b_wdata [NB],
  input  data_t                    b_rdata [NB],
  // status
  output logic                     err,
  output logic                     conflict
);

  localparam int unsigned NR = NLP + 1;   // requesters: logical ports, then ext
  localparam int unsigned RW = $clog2(NR);

  logic [GRANK_W-1:0] rank_of [NB];
  logic               hit  [NR][NB];
  logic               miss [NLP];
  logic               we_r  [NR];
  logic [GOFF_W-1:0]  off_r [NR];
  data_t              wd_r  [NR];
  logic               gnt_r [NR];
  logic [RW-1:0]      rr    [NB];
  logic [RW-1:0]      win   [NB];
  logic               any   [NB];
  logic               rd_q  [NB];
  logic [RW-1:0]      who_q [NB];
  logic               miss_q [NLP];

  function automatic lbuf_e reset_map(input int unsigned b);
    int unsigned s;
    s = (b * 16) / NB;
    if (s < 2)       return LB_IN0;
    else if (s < 6)  return LB_OUT0;
    else if (s < 10) return LB_W0;
    else if (s < 12) return LB_IN1;
    else             return LB_OUT1;
  endfunction

  // ---------------- bank table ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int b = 0; b < int'(NB); b++) map[b] <= reset_map(b);
    end else if (cfg_we && int'(cfg_bank) < int'(NB)) begin
      map[cfg_bank] <= cfg_lbuf;
    end

  // rank of a bank = number of lower banks mapped to the same logical buffer
  always_comb
    for (int b = 0; b < int'(NB); b++) begin
      rank_of[b] = '0;
      for (int j = 0; j < b; j++)
        if (map[j] == map[b]) rank_of[b] = rank_of[b] + 1'b1;
    end

  // ---------------- address translation ----------------
  always_comb begin
    for (int p = 0; p < int'(NLP); p++) begin
      we_r[p]  = lp_we[p];
      off_r[p] = lp_addr[p][GOFF_W-1:0];
      wd_r[p]  = lp_wdata[p];
      miss[p]  = 1'b1;
      for (int b = 0; b < int'(NB); b++) begin
        hit[p][b] = lp_req[p] && map[b] == lp_lbuf[p] && lp_lbuf[p] != LB_NONE &&
                    rank_of[b] == lp_addr[p][GADDR_W-1:GOFF_W];
        if (hit[p][b]) miss[p] = 1'b0;
      end
      miss[p] = miss[p] && lp_req[p];
    end
    we_r[NLP]  = ext_we;
    off_r[NLP] = ext_addr;
    wd_r[NLP]  = ext_wdata;
    for (int b = 0; b < int'(NB); b++) hit[NLP][b] = ext_req && int'(ext_bank) == b;
  end

  // ---------------- per-bank round-robin arbitration ----------------
  always_comb begin
    conflict = 1'b0;
    for (int r = 0; r < int'(NR); r++) gnt_r[r] = 1'b0;
    for (int b = 0; b < int'(NB); b++) begin
      int unsigned cnt;
      any[b] = 1'b0;
      win[b] = '0;
      cnt    = 0;
      for (int r = 0; r < int'(NR); r++) if (hit[r][b]) cnt++;
      if (cnt > 1) conflict = 1'b1;
      // first requester at or after the round-robin pointer
      for (int i = int'(NR) - 1; i >= 0; i--) begin
        int unsigned c;
        c = (int'(rr[b]) + i) % NR;
        if (hit[c][b]) begin
          any[b] = 1'b1;
          win[b] = RW'(c);
        end
      end
      if (any[b]) gnt_r[win[b]] = 1'b1;
      b_en[b]    = any[b];
      b_we[b]    = any[b] && we_r[win[b]];
      b_addr[b]  = $clog2(WORDS)'(off_r[win[b]]);
      b_wdata[b] = wd_r[win[b]];
    end
    for (int p = 0; p < int'(NLP); p++) lp_gnt[p] = gnt_r[p] || miss[p];
    ext_gnt = gnt_r[NLP];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      err <= 1'b0;
      for (int b = 0; b < int'(NB); b++) begin
        rr[b]    <= '0;
        rd_q[b]  <= 1'b0;
        who_q[b] <= '0;
      end
      for (int p = 0; p < int'(NLP); p++) miss_q[p] <= 1'b0;
    end else begin
      for (int b = 0; b < int'(NB); b++) begin
        rd_q[b]  <= any[b] && !we_r[win[b]];
        who_q[b] <= win[b];
        if (any[b]) rr[b] <= RW'((int'(win[b]) + 1) % NR);
      end
      for (int p = 0; p < int'(NLP); p++) begin
        miss_q[p] <= miss[p] && !lp_we[p];
        if (miss[p]) err <= 1'b1;
      end
    end

  // ---------------- read return ----------------
  always_comb begin
    for (int p = 0; p < int'(NLP); p++) begin
      lp_rvalid[p] = miss_q[p];
      lp_rdata[p]  = '0;
    end
    ext_rvalid = 1'b0;
    ext_rdata  = '0;
    for (int b = 0; b < int'(NB); b++)
      if (rd_q[b]) begin
        if (int'(who_q[b]) == int'(NLP)) begin
          ext_rvalid = 1'b1;
          ext_rdata  = b_rdata[b];
        end else begin
          for (int p = 0; p < int'(NLP); p++)
            if (int'(who_q[b]) == p) begin
              lp_rvalid[p] = 1'b1;
              lp_rdata[p]  = b_rdata[b];
            end
        end
      end
  end

  // the buffer's word address must stay inside one bank
  always_ff @(posedge clk)
    if (rst_n && ext_req) assert (int'(ext_addr) < int'(WORDS));

endmodule
