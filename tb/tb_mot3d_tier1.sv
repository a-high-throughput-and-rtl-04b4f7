// tb_mot3d_tier1: runs the cluster with a single memory tier (64 bank stacks of one bank, so
// no TSV sharing) and one sequential routing level, through cluster_check: exact latencies to
// every bank, then random contended traffic with checked read data.
module tb_mot3d_tier1;
  logic clk = 0, rst_n = 0;
  logic done;
  int   checks, failures;

  always #5 clk = ~clk;

  cluster_check #(.N_TIER(1), .N_SEQ(1)) u_t1 (.clk, .rst_n, .done, .checks, .failures);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
