// tb_sami_setups: runs the platform in the two smaller mesh configurations, a 10 x 10 mesh
// with 4 regions of 5 x 5 and an 8 x 8 mesh with 4 regions of 4 x 4, side by side, each in a
// closed loop for 32 sample periods (see sami_setup_run). Both must relieve their overloaded
// core and issue core- and region-triggered migrations with valid orders.
module tb_sami_setups;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin_a, fin_b;
  int ca, fa, cca, rca, hba, haa;
  int cb, fb, ccb, rcb, hbb, hab;

  sami_setup_run #(.MX(10), .MY(10), .RX(2), .RY(2)) u_10x10 (
    .clk, .rst_n, .finished(fin_a), .checks(ca), .failures(fa), .n_mig_cc(cca), .n_mig_rc(rca),
    .hot_before(hba), .hot_after(haa));
  sami_setup_run #(.MX(8), .MY(8), .RX(2), .RY(2)) u_8x8 (
    .clk, .rst_n, .finished(fin_b), .checks(cb), .failures(fb), .n_mig_cc(ccb), .n_mig_rc(rcb),
    .hot_before(hbb), .hot_after(hab));

  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb, fa + fb + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin_a && fin_b);
    $display("10x10: migrations core %0d region %0d, hot core %0d -> %0d", cca, rca, hba, haa);
    $display("8x8:   migrations core %0d region %0d, hot core %0d -> %0d", ccb, rcb, hbb, hab);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb, fa + fb);
    $finish;
  end
endmodule
