// sna_smtc: simultaneous multi-threading controller (SMTC).
//
// The SMTC partitions the PU array between threads. Its table holds, for every PU,
// the main thread (TID, one per sub-network of the siamese network)
// and the sub-thread (STID 0..3, one per branch of a hybrid structure) that owns it.
// Reset gives the lower half of the PUs to main thread 0 and the upper half to main
// thread 1, all in sub-thread 0. A configuration write (cfg_*) assigns the PUs
// cfg_base .. cfg_base+cfg_cnt-1 to (cfg_tid, cfg_stid).
//
// From the table it derives a PU mask for every (TID, STID) group, and from the
// PUs' busy signals whether a group or a whole main thread is busy. A run or swap
// issued to a group is fanned out as start/swap pulses to exactly that group's PUs
// (dispatch is combinational). The TID/STID table follows the document; the
// contiguous-range configuration and the reset partition are this design's choices.
module sna_smtc
  import sna_pkg::*;
#(
  parameter int unsigned NPU = N_PU
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // table configuration
  input  logic                     cfg_we,
  input  logic                     cfg_tid,
  input  logic [1:0]               cfg_stid,
  input  logic [LADDR_W-1:0]       cfg_base,
  input  logic [LEN_W-1:0]         cfg_cnt,
  // dispatch
  input  logic                     run_issue,
  input  logic                     swap_issue,
  input  logic                     iss_tid,
  input  logic [1:0]               iss_stid,
  output logic [NPU-1:0]           pu_start,
  output logic [NPU-1:0]           pu_swap,
  // status
  input  logic [NPU-1:0]           pu_busy,
  output logic [NPU-1:0]           grp_mask [N_TID][N_STID],
  output logic                     grp_busy [N_TID][N_STID],
  output logic                     thr_busy [N_TID],
  output logic [NPU-1:0]           pu_tid
);

  logic [1:0]     stid [NPU];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < int'(NPU); i++) begin
        pu_tid[i] <= (i >= int'(NPU / 2));
        stid[i]   <= '0;
      end
    end else if (cfg_we) begin
      for (int i = 0; i < int'(NPU); i++)
        if (i >= int'(cfg_base) && i < int'(cfg_base) + int'(cfg_cnt)) begin
          pu_tid[i] <= cfg_tid;
          stid[i]   <= cfg_stid;
        end
    end

  always_comb
    for (int t = 0; t < int'(N_TID); t++)
      for (int s = 0; s < int'(N_STID); s++)
        for (int i = 0; i < int'(NPU); i++)
          grp_mask[t][s][i] = pu_tid[i] == 1'(t) && stid[i] == 2'(s);

  always_comb
    for (int t = 0; t < int'(N_TID); t++) begin
      thr_busy[t] = 1'b0;
      for (int s = 0; s < int'(N_STID); s++) begin
        grp_busy[t][s] = |(grp_mask[t][s] & pu_busy);
        thr_busy[t]    = thr_busy[t] | grp_busy[t][s];
      end
    end

  assign pu_start = run_issue  ? grp_mask[iss_tid][iss_stid] : '0;
  assign pu_swap  = swap_issue ? grp_mask[iss_tid][iss_stid] : '0;

endmodule
