// tb_routing_switch: self-checking test of the combinational routing switch.
// Random packets are applied; the test checks that the request reaches only the output chosen
// by the select address bit, that the packet is forwarded unchanged, that the grant comes from
// that output only, and that the responses of the two subtrees are merged.
module tb_routing_switch;
  import mot_pkg::*;

  localparam int unsigned SEL_BIT = 17;

  logic       req_i, gnt_o, rvalid_o;
  req_pkt_t   pkt_i;
  data_t      rdata_o;
  logic [1:0] req_o, gnt_i, rvalid_i;
  req_pkt_t   pkt_o [2];
  data_t      rdata_i [2];

  int checks = 0, failures = 0;

  routing_switch #(.SEL_BIT(SEL_BIT)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic sel;
      req_i      = 1'($urandom);
      pkt_i      = {$urandom, $urandom, $urandom};
      gnt_i      = 2'($urandom);
      rvalid_i   = 2'(1 << $urandom_range(0, 2));  // none (4 -> 0), side 0 or side 1
      rdata_i[0] = $urandom;
      rdata_i[1] = $urandom;
      #1;
      sel = pkt_i.addr[SEL_BIT];
      check(req_o[sel] == req_i && req_o[~sel] == 1'b0, "request steering");
      check(pkt_o[sel] == pkt_i, "packet forwarded");
      check(gnt_o == (req_i && gnt_i[sel]), "grant of selected side");
      check(rvalid_o == |rvalid_i, "response valid merge");
      if (rvalid_i != 0)
        check(rdata_o == (rvalid_i[1] ? rdata_i[1] : rdata_i[0]), "response data merge");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
