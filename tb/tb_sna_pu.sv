// tb_sna_pu: self-checking test of one processing unit.
// Loads weights and IFmaps through the fill port, runs work orders and reads the
// OFmaps back through the drain port, comparing with a model of
//   out[l] = act(pool(sat(sum_k W[wbase+k] * X[l][ibase+k] (+ FOB psum)))).
// Covers: plain runs with the K+2 cycle latency, ReLU, pooling windows, a
// reduction split into a partial-sum run and a continuing run, IFmaps taken
// from the forward link with gaps (the PU must stall), vectors that arrive before
// the run starts (held in the receive register), the forward output handshake with
// a neighbour that is not ready at first, the input/output role swap, and partial
// sums read out of and written into the FOB through the mover port.
module tb_sna_pu;
  import sna_pkg::*;
  localparam int unsigned N = LANES, LW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic start = 0, swap = 0, busy;
  run_t run;
  logic wr_en = 0, st_en = 0;
  mv_e wr_kind = MV_LDW;
  logic [LW-1:0] wr_lane = 0, st_lane = 0;
  logic [LADDR_W-1:0] wr_addr = 0, st_addr = 0;
  data_t wr_data = 0, st_data;
  logic fwd_in_valid = 0, fwd_in_ready, fwd_out_valid, fwd_out_ready = 1;
  data_t fwd_in_data [N], fwd_out_data [N];

  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd_out = 0, n_send_stall = 0;
  data_t fo_data [N];
  data_t W [WBUF_WORDS];
  data_t X [N][IOB_WORDS];     // model of the current input half
  data_t Y [N][IOB_WORDS];     // model of the current output half
  acc_t  fob [N][16];

  sna_pu dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (fwd_out_valid && fwd_out_ready) begin
      n_fwd_out++;
      for (int l = 0; l < int'(N); l++) fo_data[l] = fwd_out_data[l];
    end
    if (fwd_out_valid && !fwd_out_ready) n_send_stall++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic data_t rnd(); return data_t'($urandom_range(0, 1023) - 512); endfunction

  task automatic wr(input mv_e kind, input int lane, input int a, input data_t d);
    wr_en = 1; wr_kind = kind; wr_lane = LW'(lane); wr_addr = LADDR_W'(a); wr_data = d;
    @(posedge clk); #1; wr_en = 0;
  endtask

  task automatic drain_check(input int a, input int nvalid, input string what);
    for (int l = 0; l < nvalid; l++) begin
      st_en = 1; wr_kind = MV_STO; st_lane = LW'(l); st_addr = LADDR_W'(a);
      @(posedge clk); #1; st_en = 0;
      chk(st_data === Y[l][a], $sformatf("%s lane %0d got %0d exp %0d", what, l, st_data, Y[l][a]));
    end
  endtask

  // model one run; fx gives IFmaps when taken from the forward link
  task automatic model(input run_t r, input data_t fx [][N]);
    data_t res [N];
    int wsz, pl;
    pl = int'(r.flags[F_POOL0 +: 2]);
    wsz = 1 << pl;
    for (int l = 0; l < int'(N); l++) begin
      acc_t s;
      s = r.flags[F_ACC] ? fob[l][r.slot] : 0;
      for (int k = 0; k < int'(r.k); k++)
        s += acc_t'(W[r.wbase + k]) * acc_t'(r.flags[F_SRCF] ? fx[k][l] : X[l][r.ibase + k]);
      fob[l][r.slot] = s;
      res[l] = sat_q(s);
    end
    if (!r.flags[F_PSUM])
      for (int g = 0; g < int'(N) / wsz; g++) begin
        data_t m;
        m = res[g*wsz];
        for (int j = 1; j < wsz; j++) if (res[g*wsz+j] > m) m = res[g*wsz+j];
        if (r.flags[F_RELU] && m < 0) m = 0;
        Y[g][r.obase] = m;
      end
  endtask

  task automatic do_run(input run_t r, input int exp_cycles);
    int cyc;
    data_t none [][N];
    run = r; start = 1;
    @(posedge clk); #1; start = 0;
    cyc = 0;
    while (busy) begin @(posedge clk); #1; cyc++; end
    model(r, none);
    if (exp_cycles > 0)
      chk(cyc == exp_cycles, $sformatf("run latency %0d exp %0d", cyc, exp_cycles));
  endtask

  initial begin
    run = '0;
    for (int l = 0; l < int'(N); l++) begin
      fwd_in_data[l] = 0;
      for (int s = 0; s < 16; s++) fob[l][s] = 0;
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // weights and IFmaps
    for (int a = 0; a < 64; a++) begin W[a] = rnd(); wr(MV_LDW, 0, a, W[a]); end
    for (int l = 0; l < int'(N); l++)
      for (int a = 0; a < 64; a++) begin X[l][a] = rnd(); wr(MV_LDI, l, a, X[l][a]); end

    // plain runs with various K, checked latency K+2
    for (int t = 0; t < 6; t++) begin
      run_t r;
      r = '0;
      r.k = LEN_W'($urandom_range(1, 30));
      r.wbase = LADDR_W'($urandom_range(0, 30));
      r.ibase = LADDR_W'($urandom_range(0, 30));
      r.obase = LADDR_W'(t);
      r.slot = 4'(t);
      do_run(r, int'(r.k) + 2);
      drain_check(t, N, "plain");
    end
    // ReLU and each pooling window
    for (int p = 0; p < 4; p++) begin
      run_t r;
      r = '0;
      r.k = 12; r.wbase = LADDR_W'(p * 3); r.ibase = LADDR_W'(p * 5); r.obase = LADDR_W'(10 + p);
      r.flags[F_RELU] = 1; r.flags[F_POOL0 +: 2] = 2'(p);
      do_run(r, 14);
      drain_check(10 + p, N >> p, "relu/pool");
    end
    // split reduction: psum run then continuing run
    begin
      run_t r;
      r = '0; r.k = 20; r.wbase = 0; r.ibase = 0; r.obase = 20; r.slot = 7;
      r.flags[F_PSUM] = 1;
      do_run(r, 22);
      r.flags = '0; r.flags[F_ACC] = 1; r.wbase = 20; r.ibase = 20; r.k = 25;
      do_run(r, 27);
      drain_check(20, N, "psum continue");
    end
    // partial sums through the mover port: read slot 7 of every lane as halves,
    // write new sums into slot 9, continue from them
    for (int l = 0; l < int'(N); l++)
      for (int h = 0; h < 2; h++) begin
        st_en = 1; wr_kind = MV_STP; st_lane = LW'(l); st_addr = LADDR_W'(2 * 7 + h);
        @(posedge clk); #1; st_en = 0;
        chk(st_data === ((h != 0) ? fob[l][7][31:16] : fob[l][7][15:0]), $sformatf("psum read lane %0d half %0d", l, h));
      end
    for (int l = 0; l < int'(N); l++) begin
      fob[l][9] = acc_t'($urandom_range(0, 200000)) - 100000;
      wr(MV_LDP, l, 2 * 9,     fob[l][9][15:0]);
      wr(MV_LDP, l, 2 * 9 + 1, fob[l][9][31:16]);
    end
    begin
      run_t r;
      r = '0; r.k = 6; r.wbase = 3; r.ibase = 7; r.obase = 25; r.slot = 9;
      r.flags[F_ACC] = 1;
      do_run(r, 8);
      drain_check(25, N, "psum loaded");
    end
    // forward-link source with gaps, and forward output
    begin
      run_t r;
      data_t fx [][N];
      int fo;
      fx = new[10];
      r = '0; r.k = 10; r.wbase = 5; r.obase = 30; r.slot = 2;
      r.flags[F_SRCF] = 1; r.flags[F_FWD] = 1;
      fo = n_fwd_out;
      fwd_out_ready = 0;
      // first vector arrives before the run starts
      for (int l = 0; l < int'(N); l++) begin fx[0][l] = rnd(); fwd_in_data[l] = fx[0][l]; end
      fwd_in_valid = 1; #1;
      chk(fwd_in_ready, "receive register empty");
      @(posedge clk); #1; fwd_in_valid = 0;
      repeat (3) begin @(posedge clk); #1; end
      run = r; start = 1;
      @(posedge clk); #1; start = 0;
      for (int k = 1; k < 10; k++) begin
        int gap;
        gap = $urandom_range(1, 4);
        repeat (gap) begin @(posedge clk); #1; if (busy) n_stall++; end
        for (int l = 0; l < int'(N); l++) begin fx[k][l] = rnd(); fwd_in_data[l] = fx[k][l]; end
        fwd_in_valid = 1;
        #1 while (!fwd_in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1; fwd_in_valid = 0;
      end
      while (!fwd_out_valid) begin @(posedge clk); #1; end
      repeat (3) begin @(posedge clk); #1; end
      chk(busy && fwd_out_valid, "producer holds while neighbour not ready");
      fwd_out_ready = 1;
      while (busy) begin @(posedge clk); #1; end
      model(r, fx);
      chk(n_fwd_out == fo + 1, "one forward transfer");
      for (int l = 0; l < int'(N); l++)
        chk(fo_data[l] === Y[l][30], $sformatf("forward data lane %0d", l));
      drain_check(30, N, "forward source");
      chk(n_stall > 0, "PU stalled waiting for the forward link");
      chk(n_send_stall > 0, "PU stalled sending on the forward link");
    end
    // swap: outputs become inputs
    swap = 1; @(posedge clk); #1; swap = 0;
    for (int l = 0; l < int'(N); l++)
      for (int a = 0; a < 64; a++) begin X[l][a] = Y[l][a]; end
    begin
      run_t r;
      r = '0; r.k = 4; r.wbase = 0; r.ibase = 0; r.obase = 40;
      do_run(r, 6);
      drain_check(40, N, "after swap");
    end
    $display("stalls=%0d forward pulses=%0d", n_stall, n_fwd_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
