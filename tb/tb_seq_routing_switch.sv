// tb_seq_routing_switch: self-checking test of the sequential routing switch.
// Near packets must pass in the same cycle like a combinational switch; far packets must
// appear on the far output one cycle after they are granted, stay there unchanged while the
// far side withholds its grant, and leave when granted. The far response must come back one
// cycle after it arrives, the near response at once.
module tb_seq_routing_switch;
  import mot_pkg::*;

  localparam int unsigned SEL_BIT = 20;
  localparam bit          FAR     = 1'b1;

  logic       clk = 0, rst_n = 0;
  logic       req_i, gnt_o, rvalid_o;
  req_pkt_t   pkt_i;
  data_t      rdata_o;
  logic [1:0] req_o, gnt_i, rvalid_i;
  req_pkt_t   pkt_o [2];
  data_t      rdata_i [2];

  int checks = 0, failures = 0;
  int far_seen = 0, near_seen = 0, held = 0;

  seq_routing_switch #(.SEL_BIT(SEL_BIT), .FAR(FAR)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic req_pkt_t rand_pkt(input bit side);
    req_pkt_t p = {$urandom, $urandom, $urandom};
    p.addr[SEL_BIT] = side;
    return p;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_pkt_t p;
    int       wait_cyc;
    data_t    d;
    req_i = 0; pkt_i = '0; gnt_i = 0; rvalid_i = 0; rdata_i[0] = 0; rdata_i[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      bit side;
      side = 1'($urandom);
      p = rand_pkt(side);
      @(negedge clk);
      req_i = 1; pkt_i = p;
      gnt_i[~FAR] = 1;
      gnt_i[FAR] = 1'($urandom);
      #1;
      if (side != FAR) begin
        // near: combinational path
        near_seen++;
        check(req_o[~FAR] && pkt_o[~FAR] == p && gnt_o, "near forward");
        @(negedge clk);
        req_i = 0;
        rvalid_i[~FAR] = 1; rdata_i[~FAR] = $urandom; d = rdata_i[~FAR];
        #1;
        check(rvalid_o && rdata_o == d, "near response same cycle");
        @(negedge clk);
        rvalid_i = 0;
      end else begin
        far_seen++;
        check(gnt_o && !req_o[FAR], "far accepted into stage, not yet out");
        @(negedge clk);
        req_i = 0;
        // stage holds the packet until granted
        wait_cyc = $urandom_range(0, 3);
        gnt_i[FAR] = 0;
        for (int w = 0; w < wait_cyc; w++) begin
          #1;
          check(req_o[FAR] && pkt_o[FAR] == p, "far packet held");
          held++;
          @(negedge clk);
        end
        gnt_i[FAR] = 1;
        #1;
        check(req_o[FAR] && pkt_o[FAR] == p, "far packet out");
        @(negedge clk);
        gnt_i[FAR] = 0;
        #1;
        check(!req_o[FAR], "far stage emptied after grant");
        rvalid_i[FAR] = 1; rdata_i[FAR] = $urandom; d = rdata_i[FAR];
        #1;
        check(!rvalid_o, "far response not yet at core side");
        @(negedge clk);
        rvalid_i = 0;
        #1;
        check(rvalid_o && rdata_o == d, "far response one cycle later");
        @(negedge clk);
        #1;
        check(!rvalid_o, "far response lasts one cycle");
      end
    end
    check(far_seen > 0 && near_seen > 0 && held > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
