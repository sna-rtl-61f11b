// sna_pkg: sizes, types and the instruction format shared by the SNA accelerator.
//
// The accelerator runs the two identical sub-networks of a siamese network as two
// main threads (TID 0/1) on one array of processing units (PUs); each main thread can
// be split into up to four sub-threads (STID 0..3), one per branch of a hybrid
// structure such as an inception module. The default sizes follow the main
// configuration: 64 PUs of 8 compute lanes, a 5 KB weight buffer and a 10 KB
// input/output buffer per PU, and a 16-bank 800 KB global buffer. The word width,
// the fixed-point format and the instruction encoding are this design's own choices.
package sna_pkg;

  // ---------------- data path ----------------
  localparam int unsigned DATA_W = 16;   // feature map / weight word (Q8.8)
  localparam int unsigned ACC_W  = 32;   // CACC accumulator width
  localparam int unsigned FRAC_W = 8;    // fraction bits of DATA_W words

  // ---------------- array and buffers ----------------
  localparam int unsigned N_PU        = 64;    // PUs in the array
  localparam int unsigned LANES       = 8;     // compute lanes per PU
  localparam int unsigned WBUF_WORDS  = 2560;  // 5 KB of 16-bit words
  localparam int unsigned IOB_WORDS   = 320;   // words per lane bank per half (10 KB total)
  localparam int unsigned FOB_DEPTH   = 16;    // partial-sum slots per lane
  localparam int unsigned GB_BANKS    = 16;    // global buffer banks
  localparam int unsigned GB_WORDS    = 25600; // words per bank (50 KB)

  localparam int unsigned N_TID  = 2;          // main threads (two sub-networks)
  localparam int unsigned N_STID = 4;          // sub-threads per main thread

  // ---------------- field widths ----------------
  localparam int unsigned LADDR_W = 12;        // PU-local buffer address
  localparam int unsigned GOFF_W  = 15;        // word offset inside one bank
  localparam int unsigned GRANK_W = 4;         // n-th bank of a logical buffer
  localparam int unsigned GADDR_W = GRANK_W + GOFF_W;
  localparam int unsigned LEN_W   = 12;
  localparam int unsigned BANK_W  = 4;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Logical buffers the buffer management unit can map banks onto.
  typedef enum logic [3:0] {
    LB_IN0  = 4'd0,  // input buffer of sub-network 0
    LB_OUT0 = 4'd1,  // output buffer of sub-network 0
    LB_IN1  = 4'd2,  // input buffer of sub-network 1
    LB_OUT1 = 4'd3,  // output buffer of sub-network 1
    LB_W0   = 4'd4,  // shared weight buffer, or weights of branch 0
    LB_W1   = 4'd5,  // weights of branch 1
    LB_W2   = 4'd6,  // weights of branch 2
    LB_W3   = 4'd7,  // weights of branch 3
    LB_NONE = 4'd15  // bank not mapped
  } lbuf_e;

  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_CFGBANK = 4'd1,  // bank b -> logical buffer lbuf
    OP_CFGPU   = 4'd2,  // PUs b .. b+len-1 -> (issuing thread, stid)
    OP_LDW     = 4'd3,  // global -> weight buffers of a sub-thread's PUs
    OP_LDI     = 4'd4,  // global -> input half, lane bank `lane`
    OP_STO     = 4'd5,  // output half, lane bank `lane` -> global
    OP_RUN     = 4'd6,  // compute on a sub-thread's PUs
    OP_SWAP    = 4'd7,  // swap input/output halves of a sub-thread's PUs
    OP_SYNC    = 4'd8,  // wait until the thread's mover and PUs are idle
    OP_HALT    = 4'd9,
    OP_LDP     = 4'd10, // global buffer -> FOB partial sums of a sub-thread's PUs
    OP_STP     = 4'd11  // FOB partial sums of a sub-thread's PUs -> global buffer
  } op_e;

  // RUN flag bits
  localparam int unsigned F_ACC   = 0;  // start from the FOB partial sum
  localparam int unsigned F_PSUM  = 1;  // keep result as partial sum only
  localparam int unsigned F_RELU  = 2;  // apply the activation unit
  localparam int unsigned F_FWD   = 3;  // forward the result to PU i-1
  localparam int unsigned F_SRCF  = 4;  // take IFmaps from PU i+1's forward link
  localparam int unsigned F_POOL0 = 5;  // flags[6:5]: log2 of pooling window
  localparam int unsigned FLAGS_W = 7;

  typedef struct packed {
    op_e                 op;
    logic [1:0]          stid;
    logic [FLAGS_W-1:0]  flags;
    lbuf_e               lbuf;
    logic [3:0]          lane;    // lane (LDI/STO/LDP/STP) or FOB slot (RUN)
    logic [GADDR_W-1:0]  a;       // global address (LD/STO) or output address (RUN)
    logic [LADDR_W-1:0]  b;       // local address / weight base / bank / PU base
    logic [LADDR_W-1:0]  c;       // input base (RUN)
    logic [LEN_W-1:0]    len;     // words per PU / MAC count / PU count
    logic [GADDR_W-1:0]  stride;  // global address step between PUs of a group
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Work order broadcast from the control processor to PUs.
  typedef struct packed {
    logic [FLAGS_W-1:0] flags;
    logic [LADDR_W-1:0] wbase;
    logic [LADDR_W-1:0] ibase;
    logic [LADDR_W-1:0] obase;
    logic [LEN_W-1:0]   k;
    logic [3:0]         slot;
  } run_t;

  // Mover command.
  // MV_LDP/MV_STP move 32-bit FOB partial sums as two words each: local address
  // 2*s is the low half of FOB slot s, 2*s+1 its high half.
  typedef enum logic [2:0] {
    MV_LDW = 3'd0, MV_LDI = 3'd1, MV_STO = 3'd2, MV_LDP = 3'd3, MV_STP = 3'd4
  } mv_e;

  typedef struct packed {
    mv_e                kind;
    lbuf_e              lbuf;
    logic [3:0]         lane;
    logic [GADDR_W-1:0] gaddr;
    logic [GADDR_W-1:0] stride;
    logic [LADDR_W-1:0] laddr;
    logic [LEN_W-1:0]   len;
  } mv_t;

  // Saturating conversion of an accumulator to a data word.
  function automatic data_t sat_q(input acc_t v);
    acc_t s;
    s = v >>> FRAC_W;
    if (s > acc_t'(32767))       return data_t'(16'sh7fff);
    else if (s < -acc_t'(32768)) return data_t'(16'sh8000);
    else                         return data_t'(s);
  endfunction

endpackage
