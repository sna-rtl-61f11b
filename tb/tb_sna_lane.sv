// tb_sna_lane: self-checking test of one compute lane.
// Runs random dot products, checks the CACC against a model sum, stores results in
// FOB slots, then continues a reduction from a stored partial sum (use_fob) and
// checks that too. The mover's 16-bit partial-sum port must read back both halves
// of every stored slot and, when it writes a slot, a following run must continue
// from the written value.
module tb_sna_lane;
  import sna_pkg::*;

  logic clk = 0, rst_n = 0;
  logic mac_en = 0, first = 0, use_fob = 0, fob_we = 0;
  logic [3:0] slot = 0;
  data_t w = 0, x = 0;
  acc_t acc, fob_q;
  logic ps_we = 0, ps_hi = 0;
  logic [3:0] ps_slot = 0;
  data_t ps_wdata = 0, ps_rdata;
  int checks = 0, failures = 0;
  acc_t model, saved [16];

  sna_lane dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int k, input logic from_fob, input int s);
    model = from_fob ? saved[s] : 0;
    slot = 4'(s);
    use_fob = from_fob;
    for (int i = 0; i < k; i++) begin
      w = data_t'($urandom_range(0, 65535));
      x = data_t'($urandom_range(0, 65535));
      model += acc_t'(w) * acc_t'(x);
      mac_en = 1; first = (i == 0);
      @(posedge clk); #1;
    end
    mac_en = 0; first = 0;
    checks++;
    if (acc !== model) begin
      failures++;
      $display("FAIL acc=%0d model=%0d", acc, model);
    end
    fob_we = 1; @(posedge clk); #1; fob_we = 0;
    saved[s] = model;
    checks++;
    if (fob_q !== model) begin
      failures++;
      $display("FAIL fob slot %0d = %0d model %0d", s, fob_q, model);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) saved[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 40; t++) run($urandom_range(1, 20), (t > 16) && $urandom_range(0, 1) == 1, t % 16);
    // chained partial sums in one slot
    run(5, 0, 3); run(7, 1, 3); run(3, 1, 3);
    // partial-sum port: read back every slot as two halves
    for (int sl = 0; sl < 16; sl++) begin
      ps_slot = 4'(sl);
      ps_hi = 0; #1;
      checks++;
      if (ps_rdata !== saved[sl][15:0]) begin failures++; $display("FAIL ps lo slot %0d", sl); end
      ps_hi = 1; #1;
      checks++;
      if (ps_rdata !== saved[sl][31:16]) begin failures++; $display("FAIL ps hi slot %0d", sl); end
    end
    // partial-sum port: write slots, then continue reductions from them
    for (int t = 0; t < 8; t++) begin
      acc_t v;
      int sl;
      v  = acc_t'($urandom);
      sl = $urandom_range(0, 15);
      @(negedge clk);
      ps_slot = 4'(sl); ps_we = 1;
      ps_hi = 0; ps_wdata = v[15:0];  @(negedge clk);
      ps_hi = 1; ps_wdata = v[31:16]; @(negedge clk);
      ps_we = 0;
      saved[sl] = v;
      @(posedge clk); #1;
      run($urandom_range(1, 10), 1, sl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
