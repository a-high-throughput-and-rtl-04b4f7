// tb_mot_network: self-checking test of the 3-D mesh-of-trees network, 4 cores x 8 stacks.
// Behavioural bank-stack models grant every request and answer one cycle later with a word
// derived from the address and the stack number. Phase 1 lets one core at a time access every
// stack and checks the latency: 1 cycle to the four stacks on the core's side, 3 cycles
// (2*N_SEQ+1) to the other four. Phase 2 runs all cores at once with 80 % of the accesses to
// the near half; it checks every answer and counts accesses that had to wait for arbitration
// (at the core, or for far accesses inside the sequential switch) and far accesses, all of
// which must occur.
module tb_mot_network;
  import mot_pkg::*;

  localparam int unsigned N_CORE    = 4;
  localparam int unsigned N_STACK   = 8;
  localparam int unsigned N_SEQ     = 1;
  localparam int unsigned STACK_LSB = 10;
  localparam int unsigned S_W       = $clog2(N_STACK);

  logic               clk = 0, rst_n = 0;
  logic [N_CORE-1:0]  core_req, core_gnt, core_rvalid;
  req_pkt_t           core_pkt [N_CORE];
  data_t              core_rdata [N_CORE];
  logic [N_STACK-1:0] stk_req, stk_gnt, stk_rvalid;
  req_pkt_t           stk_pkt [N_STACK];
  data_t              stk_rdata [N_STACK];

  int checks = 0, failures = 0, stalls = 0, buffered_waits = 0, far_acc = 0, near_acc = 0;
  int phase = 0, done_cores = 0;

  mot_network #(.N_CORE(N_CORE), .N_STACK(N_STACK), .N_SEQ(N_SEQ), .STACK_LSB(STACK_LSB)) dut (.*);

  always #5 clk = ~clk;

  function automatic data_t answer(input logic [31:0] addr, input int s);
    return {addr[15:0], addr[31:16]} + 32'(s * 1000);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // bank-stack models
  assign stk_gnt = '1;
  always @(posedge clk)
    for (int s = 0; s < N_STACK; s++) begin
      stk_rvalid[s] <= stk_req[s];
      stk_rdata[s]  <= answer(stk_pkt[s].addr, s);
    end

  // one access of core c to stack s; returns the cycles from request to response
  task automatic access(input int c, input int s, output int lat, output bit waited);
    @(negedge clk);
    core_pkt[c] = {$urandom, $urandom, $urandom};
    core_pkt[c].addr[STACK_LSB +: S_W] = S_W'(s);
    core_req[c] = 1;
    lat = 0; waited = 0;
    forever begin
      @(posedge clk);
      lat++;
      if (core_gnt[c]) break;
      waited = 1;
    end
    @(negedge clk);
    core_req[c] = 0;
    while (!core_rvalid[c]) begin
      @(posedge clk);
      lat++;
      @(negedge clk);
    end
    check(core_rdata[c] == answer(core_pkt[c].addr, s), $sformatf("core %0d data from stack %0d", c, s));
  endtask

  function automatic bit is_near(input int c, input int s);
    int home = c * N_STACK / N_CORE;
    return (s >> (S_W - N_SEQ)) == (home >> (S_W - N_SEQ));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat; bit waited;
    core_req = '0;
    for (int c = 0; c < N_CORE; c++) core_pkt[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: one core at a time, exact latencies
    for (int c = 0; c < N_CORE; c++)
      for (int s = 0; s < N_STACK; s++) begin
        access(c, s, lat, waited);
        check(lat == (is_near(c, s) ? 1 : 2 * N_SEQ + 1),
              $sformatf("latency %0d core %0d stack %0d", lat, c, s));
      end
    phase = 1;
    wait (done_cores == N_CORE);
    check(stalls > 0 && buffered_waits > 0 && far_acc > 0 && near_acc > 0,
          "contention at both switch kinds, far and near accesses happened");
    $display("near %0d far %0d arbitration waits %0d, far packets waiting in a sequential switch %0d",
             near_acc, far_acc, stalls, buffered_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase 2: all cores at once, 80 % near
  for (genvar c = 0; c < N_CORE; c++) begin : g_core
    initial begin
      int lat, s, home; bit waited;
      wait (phase == 1);
      home = c * N_STACK / N_CORE;
      for (int i = 0; i < 1500; i++) begin
        if ($urandom_range(0, 9) < 8)
          s = (home & ~((1 << (S_W - N_SEQ)) - 1)) | $urandom_range(0, (1 << (S_W - N_SEQ)) - 1);
        else
          s = $urandom_range(0, N_STACK - 1);
        if (is_near(c, s)) near_acc++; else far_acc++;
        access(c, s, lat, waited);
        if (waited) stalls++;
        // a far access is taken by the sequential switch at once and may then wait there
        if (!waited && is_near(c, s)) check(lat == 1, "near latency without waiting");
        if (!waited && !is_near(c, s)) begin
          check(lat >= 2 * N_SEQ + 1, "far latency");
          if (lat > 2 * N_SEQ + 1) buffered_waits++;
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      done_cores++;
    end
  end
endmodule
