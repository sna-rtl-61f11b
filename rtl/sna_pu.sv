// sna_pu: processing unit (PU) of the SNA array.
//
// A PU holds LANES compute lanes that share one weight buffer and one private
// input/output buffer. A run (start with a run_t work order) computes, for every
// lane l,
//     acc[l] = (F_ACC ? FOB[slot] : 0) + sum_{k<K} W[wbase+k] * X[l][k]
// where one weight per cycle is broadcast to all lanes and X[l][k] is either word
// ibase+k of lane bank l of the input half, or (F_SRCF) lane l of the k-th vector
// received on the forward link from PU i+1. The CACC is then saved into FOB[slot].
// Unless F_PSUM is set, the results are narrowed to 16 bits, passed through the
// pooling unit (window 2**flags[6:5] lanes) and the activation unit (F_RELU), and
// written to the output half at obase; with F_FWD the same vector is also sent on
// the forward link to PU i-1.
//
// Buffer port: the data mover writes the weight buffer, the input half or (as
// 16-bit halves, local address 2*s+h) FOB slot s of one lane, and reads the
// output half or a FOB half of one lane, with one cycle of read latency. The FOB
// path lets partial sums be parked in the global buffer between runs.
//
// Forward link: a valid/ready handshake carrying one LANES-wide vector. The
// receiving PU keeps one vector in a holding register (taken whenever it is empty,
// even while the PU is idle) and frees it when a MAC consumes it, so producer and
// consumer need not be started in a fixed order. A consumer waiting for a vector
// stalls; a producer whose neighbour is still full stalls in its send state.
//
// Timing: busy rises the cycle after start. With the input buffer as source and
// no forwarding a run takes K+2 cycles (K MAC cycles, one read-latency cycle, one
// write-back cycle); sending on the forward link adds at least one cycle. The lane structure,
// the weight broadcast, the shared buffers, the forward link and the pooling and
// activation units follow the document; the run_t work order, the pipeline and
// the flag set are this design's own.
module sna_pu
  import sna_pkg::*;
#(
  parameter int unsigned N     = LANES,
  parameter int unsigned WWORDS = WBUF_WORDS,
  parameter int unsigned IWORDS = IOB_WORDS,
  parameter int unsigned FOB_D = FOB_DEPTH
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // work order
  input  logic                      start,
  input  run_t                      run,
  input  logic                      swap,
  output logic                      busy,
  // buffer fill / drain from the global buffer
  input  logic                      wr_en,
  input  mv_e                       wr_kind,  // MV_LDW weights, MV_LDI input half,
                                                // MV_LDP FOB; stores: MV_STO output
                                                // half, MV_STP FOB
  input  logic [$clog2(N)-1:0]      wr_lane,
  input  logic [LADDR_W-1:0]        wr_addr,
  input  data_t                     wr_data,
  input  logic                      st_en,
  input  logic [$clog2(N)-1:0]      st_lane,
  input  logic [LADDR_W-1:0]        st_addr,
  output data_t                     st_data,
  // forward link
  input  logic                      fwd_in_valid,
  output logic                      fwd_in_ready,
  input  data_t                     fwd_in_data  [N],
  output logic                      fwd_out_valid,
  input  logic                      fwd_out_ready,
  output data_t                     fwd_out_data [N]
);

  typedef enum logic [1:0] { S_IDLE, S_RUN, S_FIN, S_SEND } state_e;

  state_e             state;
  run_t               r;
  logic [LEN_W-1:0]   k;        // next MAC index to issue
  logic               v_b;      // a MAC operand pair is on the buffer outputs
  logic               first_b, last_b;
  logic               issue;
  data_t              wq;
  data_t              iq   [N];
  data_t              xfwd [N];
  logic               hold_v;
  data_t              hold_d [N];
  data_t              x_b  [N];
  acc_t               acc  [N];
  data_t              res  [N];
  data_t              pooled [N];
  logic               pvalid [N];
  data_t              act_o  [N];
  logic               out_we [N];
  logic               src_f;
  logic               ps_we, ps_hi;
  logic [$clog2(FOB_D)-1:0] ps_slot;
  data_t              ps_rd  [N];
  data_t              ps_q;     // FOB half read for a store, one cycle latency
  logic               ps_sel_q; // the pending store reads the FOB
  data_t              ob_data;

  assign busy  = (state != S_IDLE);
  assign src_f = r.flags[F_SRCF];
  assign issue = (state == S_RUN) && (k < r.k) && (!src_f || hold_v);
  assign fwd_in_ready  = !hold_v;
  assign fwd_out_valid = (state == S_SEND);

  // the mover's FOB port: local address 2*s (+1 for the high half) of lane wr_lane
  // for loads, st_lane for stores
  assign ps_we   = wr_en && (wr_kind == MV_LDP);
  assign ps_hi   = wr_en ? wr_addr[0] : st_addr[0];
  assign ps_slot = $clog2(FOB_D)'(wr_en ? wr_addr[LADDR_W-1:1] : st_addr[LADDR_W-1:1]);
  assign st_data = ps_sel_q ? ps_q : ob_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ps_q     <= '0;
      ps_sel_q <= 1'b0;
    end else if (st_en) begin
      ps_q     <= ps_rd[st_lane];
      ps_sel_q <= (wr_kind == MV_STP);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      r       <= '0;
      k       <= '0;
      v_b     <= 1'b0;
      first_b <= 1'b0;
      last_b  <= 1'b0;
      hold_v  <= 1'b0;
      for (int l = 0; l < int'(N); l++) begin
        xfwd[l]   <= '0;
        hold_d[l] <= '0;
      end
    end else begin
      if (issue && src_f) hold_v <= 1'b0;
      else if (fwd_in_valid && !hold_v) begin
        hold_v <= 1'b1;
        for (int l = 0; l < int'(N); l++) hold_d[l] <= fwd_in_data[l];
      end
      v_b     <= issue;
      first_b <= issue && (k == '0);
      last_b  <= issue && (k == r.k - 1'b1);
      if (issue) begin
        k <= k + 1'b1;
        for (int l = 0; l < int'(N); l++) xfwd[l] <= hold_d[l];
      end
      unique case (state)
        S_IDLE: if (start) begin
          r     <= run;
          k     <= '0;
          state <= (run.k == '0) ? S_FIN : S_RUN;
        end
        S_RUN:  if (v_b && last_b) state <= S_FIN;
        S_FIN:  state <= (r.flags[F_FWD] && !r.flags[F_PSUM]) ? S_SEND : S_IDLE;
        S_SEND: if (fwd_out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- buffers ----------------
  sna_wbuf #(.WORDS(WWORDS)) u_wbuf (
    .clk   (clk),
    .we    (wr_en && wr_kind == MV_LDW),
    .waddr ($clog2(WWORDS)'(wr_addr)),
    .wdata (wr_data),
    .re    (issue),
    .raddr ($clog2(WWORDS)'(r.wbase + k)),
    .rdata (wq)
  );

  sna_iobuf #(.N(N), .WORDS(IWORDS)) u_iobuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .swap      (swap && state == S_IDLE),
    .sel       (),
    .in_we     (wr_en && wr_kind == MV_LDI),
    .in_lane   (wr_lane),
    .in_addr   ($clog2(IWORDS)'(wr_addr)),
    .in_wdata  (wr_data),
    .rd_en     (issue && !src_f),
    .rd_addr   ($clog2(IWORDS)'(r.ibase + k)),
    .rd_data   (iq),
    .out_we    (out_we),
    .out_addr  ($clog2(IWORDS)'(r.obase)),
    .out_wdata (act_o),
    .st_en     (st_en && wr_kind == MV_STO),
    .st_lane   (st_lane),
    .st_addr   ($clog2(IWORDS)'(st_addr)),
    .st_data   (ob_data)
  );

  // ---------------- lanes: input mux, MAC, CACC, FOB ----------------
  for (genvar l = 0; l < int'(N); l++) begin : g_lane
    assign x_b[l] = src_f ? xfwd[l] : iq[l];
    sna_lane #(.FOB_D(FOB_D)) u_lane (
      .clk     (clk),
      .rst_n   (rst_n),
      .mac_en  (v_b),
      .first   (first_b),
      .use_fob (r.flags[F_ACC]),
      .slot    ($clog2(FOB_D)'(r.slot)),
      .w       (wq),
      .x       (x_b[l]),
      .fob_we  (state == S_FIN),
      .acc     (acc[l]),
      .fob_q   (),
      .ps_we   (ps_we && wr_lane == $clog2(N)'(l)),
      .ps_hi   (ps_hi),
      .ps_slot (ps_slot),
      .ps_wdata(wr_data),
      .ps_rdata(ps_rd[l])
    );
    assign res[l] = sat_q(acc[l]);
  end

  // ---------------- pooling and activation ----------------
  sna_pool #(.N(N)) u_pool (
    .win_log2 (r.flags[F_POOL0 +: 2]),
    .din      (res),
    .dout     (pooled),
    .valid    (pvalid)
  );

  sna_act #(.N(N)) u_act (
    .en   (r.flags[F_RELU]),
    .din  (pooled),
    .dout (act_o)
  );

  always_comb
    for (int l = 0; l < int'(N); l++)
      out_we[l] = (state == S_FIN) && !r.flags[F_PSUM] && pvalid[l];

  // ---------------- forward link to PU i-1 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < int'(N); l++) fwd_out_data[l] <= '0;
    end else begin
      if (state == S_FIN)
        for (int l = 0; l < int'(N); l++) fwd_out_data[l] <= act_o[l];
    end
  end

  // work-order rule: a PU is started only when idle, and its roles swapped only
  // when idle
  always_ff @(posedge clk)
    if (rst_n) assert (!((start || swap) && busy));

endmodule
