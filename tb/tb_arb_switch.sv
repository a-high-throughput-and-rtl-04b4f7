// tb_arb_switch: self-checking test of the 2-to-1 round-robin arbitration switch.
// A reference model of the priority token predicts the winner each cycle; the test checks the
// forwarded packet, that only the winner is granted, that the token alternates under constant
// competition (no starvation), and that the response one cycle later goes to the winner.
module tb_arb_switch;
  import mot_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [1:0] req_i, gnt_o, rvalid_o;
  req_pkt_t   pkt_i [2];
  data_t      rdata_o [2];
  logic       req_o, gnt_i, rvalid_i;
  req_pkt_t   pkt_o;
  data_t      rdata_i;

  int checks = 0, failures = 0, ties = 0;

  arb_switch dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prio = 0, win, granted_prev = 0, last_win = 0;
    int run0 = 0, run1 = 0;
    req_i = 0; gnt_i = 0; rvalid_i = 0; rdata_i = 0; pkt_i[0] = '0; pkt_i[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req_i    = (i < 1000) ? 2'($urandom) : 2'b11;
      gnt_i    = (i < 1000) ? 1'($urandom) : 1'b1;
      pkt_i[0] = {$urandom, $urandom, $urandom};
      pkt_i[1] = {$urandom, $urandom, $urandom};
      rvalid_i = granted_prev;
      rdata_i  = $urandom;
      #1;
      win = (req_i == 2'b01) ? 1'b0 : (req_i == 2'b10) ? 1'b1 : prio;
      if (req_i == 2'b11) ties++;
      check(req_o == |req_i, "request or");
      if (req_i != 0) begin
        check(pkt_o == pkt_i[win], "winner packet");
        check(gnt_o == (gnt_i ? 2'(1 << win) : 2'b00), "grant to winner only");
      end else
        check(gnt_o == 2'b00, "no grant without request");
      if (granted_prev)
        check(rvalid_o == 2'(1 << last_win) && rdata_o[last_win] == rdata_i, "response to previous winner");
      else
        check(rvalid_o == 2'b00, "no response");
      granted_prev = (req_i != 0) && gnt_i;
      if (granted_prev) begin
        prio = ~win;
        last_win = win;
        if (i >= 1000) begin
          if (win) begin run1++; run0 = 0; end else begin run0++; run1 = 0; end
          check(run0 <= 1 && run1 <= 1, "alternating grants under full load");
        end
      end
    end
    check(ties > 0, "ties happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
