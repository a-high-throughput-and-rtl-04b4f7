// tb_arb_tree: self-checking test of the arbitration tree in front of one bank stack.
// Eight core models issue random accesses and hold them until granted; a bank model grants
// (always, or at random in the second phase) and answers one cycle after each grant. The test
// checks that at most one core is granted, that the packet at the root is the granted core's,
// that the answer reaches exactly that core one cycle later, and, while the bank grants every
// cycle, that no core waits more than N_LEAF-1 cycles (round robin, no starvation).
module tb_arb_tree;
  import mot_pkg::*;

  localparam int unsigned N_LEAF = 8;

  logic              clk = 0, rst_n = 0;
  logic [N_LEAF-1:0] req_i, gnt_o, rvalid_o;
  req_pkt_t          pkt_i [N_LEAF];
  data_t             rdata_o [N_LEAF];
  logic              req_o, gnt_i, rvalid_i;
  req_pkt_t          pkt_o;
  data_t             rdata_i;

  int checks = 0, failures = 0, max_wait = 0, contended = 0;

  arb_tree #(.N_LEAF(N_LEAF)) dut (.*);

  always #5 clk = ~clk;

  function automatic data_t answer(input req_pkt_t p);
    return p.addr ^ p.wdata;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int       waitc [N_LEAF];
    bit       expect_resp [N_LEAF];
    data_t    expect_data [N_LEAF];
    bit       prev_grant = 0;
    req_pkt_t prev_pkt = '0;
    int       ngrant, who;
    bit       granted [N_LEAF];
    req_i = '0; gnt_i = 0; rvalid_i = 0; rdata_i = '0;
    for (int k = 0; k < N_LEAF; k++) begin
      pkt_i[k] = '0; waitc[k] = 0; expect_resp[k] = 0; granted[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit full = (cyc >= 2000 && cyc < 3000);
      @(negedge clk);
      for (int k = 0; k < N_LEAF; k++)
        if (granted[k]) req_i[k] = 0;
      for (int k = 0; k < N_LEAF; k++)
        if (!req_i[k] && !expect_resp[k] && (full || $urandom_range(0, 2) == 0)) begin
          req_i[k] = 1;
          pkt_i[k] = {$urandom, $urandom, $urandom};
          waitc[k] = 0;
        end
      gnt_i    = (cyc < 4000) ? 1'b1 : 1'($urandom);
      rvalid_i = prev_grant;
      rdata_i  = answer(prev_pkt);
      #1;
      // responses
      for (int k = 0; k < N_LEAF; k++) begin
        check(rvalid_o[k] == expect_resp[k], "response valid to the granted core");
        if (expect_resp[k]) check(rdata_o[k] == expect_data[k], "response data");
        expect_resp[k] = 0;
      end
      // grants
      ngrant = 0; who = 0;
      for (int k = 0; k < N_LEAF; k++) if (gnt_o[k]) begin ngrant++; who = k; end
      if ($countones(req_i) > 1) contended++;
      check(req_o == |req_i, "request reaches the root");
      check(ngrant == ((req_o && gnt_i) ? 1 : 0), "one grant per bank grant");
      prev_grant = (ngrant == 1);
      if (ngrant == 1) begin
        check(req_i[who] && pkt_o == pkt_i[who], "root packet is the winner's");
        prev_pkt = pkt_o;
        expect_resp[who] = 1;
        expect_data[who] = answer(pkt_i[who]);
      end
      for (int k = 0; k < N_LEAF; k++) begin
        if (req_i[k] && !gnt_o[k]) begin
          waitc[k]++;
          if (cyc < 4000) begin
            if (waitc[k] > max_wait) max_wait = waitc[k];
            check(waitc[k] <= N_LEAF - 1, $sformatf("core %0d starves", k));
          end
        end
        granted[k] = gnt_o[k];
      end
    end
    check(contended > 0, "contention happened");
    $display("max wait %0d cycles, %0d contended cycles", max_wait, contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
