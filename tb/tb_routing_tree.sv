// tb_routing_tree: self-checking test of one core's routing tree with sequential levels.
// An 8-leaf tree with two sequential levels and home leaf 5 is driven by one core model that
// issues an access, holds it until granted and waits for the response. Behavioural leaf
// models grant (always in phase 1, at random in phase 2) and answer one cycle after the grant
// with a word derived from the address and the leaf number. The test checks that only the
// addressed leaf sees the request, that the right data returns, and in phase 1 that the
// latency is 1 + 2 * (sequential levels on which the leaf lies on the far side).
module tb_routing_tree;
  import mot_pkg::*;

  localparam int unsigned N_LEAF   = 8;
  localparam int unsigned N_SEQ    = 2;
  localparam int unsigned HOME     = 5;
  localparam int unsigned ADDR_LSB = 10;
  localparam int unsigned LEAF_W   = $clog2(N_LEAF);

  logic              clk = 0, rst_n = 0;
  logic              req_i, gnt_o, rvalid_o;
  req_pkt_t          pkt_i;
  data_t             rdata_o;
  logic [N_LEAF-1:0] req_o, gnt_i, rvalid_i;
  req_pkt_t          pkt_o [N_LEAF];
  data_t             rdata_i [N_LEAF];

  int checks = 0, failures = 0;
  int lat_hist [4];
  int target;
  bit random_gnt = 0;

  routing_tree #(.N_LEAF(N_LEAF), .N_SEQ(N_SEQ), .HOME(HOME), .ADDR_LSB(ADDR_LSB)) dut (.*);

  always #5 clk = ~clk;

  function automatic data_t answer(input logic [31:0] addr, input int leaf);
    return addr ^ (32'h9e37_79b9 * (leaf + 1));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // behavioural leaves: grant, answer one cycle after the grant
  always @(negedge clk) gnt_i <= random_gnt ? N_LEAF'($urandom) : '1;
  always @(posedge clk) begin
    for (int k = 0; k < N_LEAF; k++) begin
      rvalid_i[k] <= req_o[k] && gnt_i[k];
      rdata_i[k]  <= answer(pkt_o[k].addr, k);
      if (req_o[k] && rst_n) begin
        checks++;
        if (k != target) begin
          failures++;
          $display("FAIL request at leaf %0d, expected %0d", k, target);
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_i = 0; pkt_i = '0; target = 0;
    rvalid_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int far, lat;
      logic [LEAF_W-1:0] leaf;
      if (i == 1000) random_gnt = 1;
      leaf = LEAF_W'($urandom);
      target = leaf;
      far = 0;
      for (int l = 0; l < N_SEQ; l++)
        if (leaf[LEAF_W-1-l] != HOME[LEAF_W-1-l]) far++;
      @(negedge clk);
      pkt_i = {$urandom, $urandom, $urandom};
      pkt_i.addr[ADDR_LSB +: LEAF_W] = leaf;
      req_i = 1;
      lat = 0;
      // hold the request until granted
      forever begin
        @(posedge clk);
        lat++;
        if (gnt_o) break;
      end
      @(negedge clk);
      req_i = 0;
      while (!rvalid_o) begin
        @(posedge clk);
        lat++;
        @(negedge clk);
      end
      check(rdata_o == answer(pkt_i.addr, leaf), "response data");
      if (!random_gnt) begin
        check(lat == 1 + 2 * far, $sformatf("latency %0d for leaf %0d", lat, leaf));
        lat_hist[far]++;
      end
    end
    check(lat_hist[0] > 0 && lat_hist[1] > 0 && lat_hist[2] > 0, "all distances used");
    $display("accesses by far levels: 0:%0d 1:%0d 2:%0d", lat_hist[0], lat_hist[1], lat_hist[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
