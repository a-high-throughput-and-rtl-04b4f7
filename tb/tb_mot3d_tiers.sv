// tb_mot3d_tiers: runs the cluster with 4 and with 8 stacked memory tiers side by side (one
// sequential routing level, TSV sharing among the 4 or 8 banks of each bank stack, so 16 or 8
// bank stacks). Each runs cluster_check: exact latencies to every bank, then random contended
// traffic with checked read data and shared-TSV competition between tiers.
module tb_mot3d_tiers;
  logic clk = 0, rst_n = 0;
  logic [1:0] done;
  int   chk [2], fl [2];

  always #5 clk = ~clk;

  cluster_check #(.N_TIER(4), .N_SEQ(1)) u_t4 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  cluster_check #(.N_TIER(8), .N_SEQ(1)) u_t8 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk.sum(), fl.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", chk.sum(), fl.sum());
    $finish;
  end
endmodule
