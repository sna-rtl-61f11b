// sna_dma: data mover of one main thread.
//
// Moves words between the global buffer (through a logical port of the buffer
// management unit) and the private buffers of the PUs of one sub-thread, following
// the static schedule in the instructions, so the PUs never handshake for data.
// A command names the group's PU mask (latched at the start) and, for each member
// PU m in increasing PU order (m = 0, 1, ... its rank in the group), moves len
// words between global address gaddr + m*stride + i and local address laddr + i:
//   MV_LDW  global -> weight buffer      (stride 0 broadcasts the same weights)
//   MV_LDI  global -> input half, lane bank `lane`
//   MV_STO  output half, lane bank `lane` -> global
//   MV_LDP  global -> FOB of lane `lane` (partial sums, two words per slot)
//   MV_STP  FOB of lane `lane` -> global
// A load word takes two cycles when the bank is free (request/grant, then read
// data written into the PU); a store word takes three (PU read, data, write
// request/grant).
// Lost arbitration simply holds the request. Load data goes from the buffer's read
// port to the PU unregistered (p_wdata is g_rdata). busy is high from the cycle after
// cmd_valid until the last word is written. The whole mover is this design's
// simplest rendering of the bus fabric feeding the PUs from the global buffer.
module sna_dma
  import sna_pkg::*;
#(
  parameter int unsigned NPU = N_PU
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cmd_valid,
  input  mv_t                       cmd,
  input  logic [NPU-1:0]            cmd_mask,
  output logic                      busy,
  // logical port of the buffer management unit
  output logic                      g_req,
  output logic                      g_we,
  output lbuf_e                     g_lbuf,
  output logic [GADDR_W-1:0]        g_addr,
  output data_t                     g_wdata,
  input  logic                      g_gnt,
  input  logic                      g_rvalid,
  input  data_t                     g_rdata,
  // PU buffer port
  output logic [$clog2(NPU)-1:0]    p_idx,
  output logic                      p_we,
  output mv_e                       p_kind,    // selects the PU buffer written or read
  output logic [3:0]                p_lane,
  output logic [LADDR_W-1:0]        p_addr,
  output data_t                     p_wdata,
  output logic                      p_re,
  input  data_t                     p_rdata
);

  typedef enum logic [2:0] { D_IDLE, D_PICK, D_GREQ, D_GWAIT, D_PRD, D_PWAIT } dstate_e;

  dstate_e              st;
  mv_t                  c;
  logic [NPU-1:0]       rem;
  logic [$clog2(NPU)-1:0] ffs;
  logic                 ffs_v;
  logic [GADDR_W-1:0]   gbase;    // gaddr + m*stride for the current PU
  logic [LEN_W-1:0]     i;
  data_t                hold;
  logic                 is_st;    // the command moves words out of the PUs

  assign busy  = (st != D_IDLE);
  assign is_st = (c.kind == MV_STO) || (c.kind == MV_STP);

  always_comb begin
    ffs   = '0;
    ffs_v = 1'b0;
    for (int j = int'(NPU) - 1; j >= 0; j--)
      if (rem[j]) begin
        ffs   = $clog2(NPU)'(j);
        ffs_v = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= D_IDLE;
      c     <= '0;
      rem   <= '0;
      p_idx <= '0;
      gbase <= '0;
      i     <= '0;
      hold  <= '0;
    end else begin
      unique case (st)
        D_IDLE: if (cmd_valid) begin
          c     <= cmd;
          rem   <= cmd_mask;
          gbase <= cmd.gaddr;
          st    <= D_PICK;
        end
        D_PICK: begin
          i <= '0;
          if (!ffs_v || c.len == '0) st <= D_IDLE;
          else begin
            p_idx <= ffs;
            st    <= is_st ? D_PRD : D_GREQ;
          end
        end
        D_GREQ:  if (g_gnt && !is_st) st <= D_GWAIT;  // stores: see below
        D_GWAIT: ;
        D_PRD:   st <= D_PWAIT;       // stores: PU read issued
        D_PWAIT: begin                // stores: PU data available
          hold <= p_rdata;
          st   <= D_GREQ;
        end
        default: st <= D_IDLE;
      endcase
      // word bookkeeping
      if ((!is_st && st == D_GWAIT && g_rvalid) ||
          (is_st && st == D_GREQ && g_gnt)) begin
        if (i == c.len - 1'b1) begin
          rem[p_idx] <= 1'b0;
          gbase      <= gbase + c.stride;
          st         <= D_PICK;
        end else begin
          i  <= i + 1'b1;
          st <= is_st ? D_PRD : D_GREQ;
        end
      end
    end
  end

  always_comb begin
    g_req   = (st == D_GREQ);
    g_we    = is_st;
    g_lbuf  = c.lbuf;
    g_addr  = gbase + GADDR_W'(i);
    g_wdata = hold;
    p_we    = !is_st && (st == D_GWAIT) && g_rvalid;
    p_kind  = c.kind;
    p_lane  = c.lane;
    p_addr  = c.laddr + i;
    p_wdata = g_rdata;
    p_re    = is_st && (st == D_PRD);
  end

  // command rule: a new command only when the mover is idle
  always_ff @(posedge clk)
    if (rst_n) assert (!(cmd_valid && busy));

endmodule
