// tb_sna_wl_lanes: lane-count sweep. Builds the accelerator with 2, 4, 8 and 16
// compute lanes per PU (an 8-PU array each) and runs the same layer on every one
// of them (see tb_sna_wl_lanes_body); passes when every configuration computes
// correct results with the K+2 run latency.
module tb_sna_wl_lanes;
  logic fin [4];
  int   c [4], f [4];
  int   checks, failures;

  tb_sna_wl_lanes_body #(.NL(2))  u_l2  (.fin(fin[0]), .checks(c[0]), .failures(f[0]));
  tb_sna_wl_lanes_body #(.NL(4))  u_l4  (.fin(fin[1]), .checks(c[1]), .failures(f[1]));
  tb_sna_wl_lanes_body #(.NL(8))  u_l8  (.fin(fin[2]), .checks(c[2]), .failures(f[2]));
  tb_sna_wl_lanes_body #(.NL(16)) u_l16 (.fin(fin[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    repeat (200000) @(posedge u_l2.clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
