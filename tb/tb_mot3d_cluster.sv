// tb_mot3d_cluster: end-to-end test of the cluster interconnect and stacked TCDM at full size.
// The top runs with its default parameters: 32 cores, 64 banks of 64 KB in 2 tiers (32 bank
// stacks with shared TSVs), one level of sequential routing switches.
//
// Core models (one per core, one access in flight, request held until granted) run four phases:
//   1. one core at a time reads and writes every bank: latency must be 1 cycle for the banks on
//      the core's half of the stacks and 2*N_SEQ+1 = 3 cycles for the others;
//   2. all cores at a TCDM access rate of r*p_TCDM = 0.3*0.2 per cycle, p0/p1 = 0.8/0.2;
//   3. the same at p_TCDM = 0.8;
//   4. all cores back-to-back (rate 1) to force heavy contention.
// Every read is compared with a reference memory (each core uses its own word offsets, so the
// expected value does not depend on arbitration order). The test counts near and far accesses,
// accesses that waited for arbitration, far packets that waited inside a sequential switch,
// and cycles in which cores competed for the shared TSVs of one bank stack with different
// tiers; each must happen at least once. It also checks that no core waits for a grant longer
// than the round-robin bound (N_CORE-1 cycles per level of contention, taken as N_CORE*2),
// and checks the TSV-count function of mot_pkg for 2 tiers and for 1.
module tb_mot3d_cluster;
  import mot_pkg::*;

  localparam int unsigned N_CORE  = 32;
  localparam int unsigned N_BANK  = 64;
  localparam int unsigned N_TIER  = 2;
  localparam int unsigned N_SEQ   = 1;
  localparam int unsigned N_STACK = N_BANK / N_TIER;
  localparam int unsigned OFF_LSB = 2;
  localparam int unsigned BANK_LSB = 16;                   // 64 KB per bank
  localparam int unsigned T_W     = $clog2(N_TIER);
  localparam int unsigned S_W     = $clog2(N_STACK);

  logic              clk = 0, rst_n = 0;
  logic [N_CORE-1:0] core_req, core_gnt, core_rvalid;
  req_pkt_t          core_pkt [N_CORE];
  data_t             core_rdata [N_CORE];

  int checks = 0, failures = 0;
  int near_acc = 0, far_acc = 0, arb_waits = 0, buf_waits = 0, tsv_conflicts = 0;
  int reads = 0, writes = 0, max_wait = 0;
  int phase = 0, done_cores = 0;
  longint lat_sum [5], lat_cnt [5];

  mot3d_cluster dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference memory, word address -> data
  data_t ref_mem [int unsigned];

  function automatic int home_stack(input int c);
    return c * N_STACK / N_CORE;
  endfunction

  function automatic bit is_near(input int c, input int bank);
    int s = bank >> T_W;
    return (s >> (S_W - N_SEQ)) == (home_stack(c) >> (S_W - N_SEQ));
  endfunction

  // word address used by core c in a bank: the offset's low 5 bits are the core number
  function automatic int unsigned word_addr(input int c, input int bank, input int slot);
    return (bank << (BANK_LSB - 2)) | (slot << 5) | c;
  endfunction

  // one access of core c
  task automatic access(input int c, input int bank, input int slot, input bit we, output int lat);
    int unsigned waddr;
    bit waited = 0;
    @(negedge clk);
    waddr = word_addr(c, bank, slot);
    core_pkt[c].we    = we;
    // the first write of a word writes all bytes, later ones random bytes
    core_pkt[c].be    = !we ? 4'h0 : ref_mem.exists(waddr) ? 4'($urandom_range(1, 15)) : 4'hf;
    core_pkt[c].addr  = {waddr[29:0], 2'($urandom)};
    core_pkt[c].wdata = $urandom;
    core_req[c] = 1;
    lat = 0;
    forever begin
      @(posedge clk);
      lat++;
      if (core_gnt[c]) break;
      waited = 1;
    end
    if (waited) arb_waits++;
    if (lat - 1 > max_wait) max_wait = lat - 1;
    check(lat - 1 <= 2 * N_CORE, "grant within the round-robin bound");
    @(negedge clk);
    core_req[c] = 0;
    while (!core_rvalid[c]) begin
      @(posedge clk);
      lat++;
      @(negedge clk);
    end
    if (we) begin
      data_t old = ref_mem.exists(waddr) ? ref_mem[waddr] : 32'h0;
      for (int b = 0; b < 4; b++)
        if (core_pkt[c].be[b]) old[8*b +: 8] = core_pkt[c].wdata[8*b +: 8];
      ref_mem[waddr] = old;
      writes++;
    end else begin
      check(core_rdata[c] == ref_mem[waddr], $sformatf("core %0d read bank %0d", c, bank));
      reads++;
    end
    if (is_near(c, bank)) near_acc++; else far_acc++;
    if (!waited && is_near(c, bank)) check(lat == 1, "near latency");
    if (!waited && !is_near(c, bank)) begin
      check(lat >= 2 * N_SEQ + 1, "far latency");
      if (lat > 2 * N_SEQ + 1) buf_waits++;
    end
    lat_sum[phase] += lat;
    lat_cnt[phase]++;
  endtask

  // competition of different tiers of one bank stack for its shared TSVs
  always @(posedge clk) if (rst_n)
    for (int s = 0; s < N_STACK; s++) begin
      bit seen [N_TIER];
      int kinds;
      kinds = 0;
      for (int t = 0; t < N_TIER; t++) seen[t] = 0;
      for (int c = 0; c < N_CORE; c++)
        if (dut.u_net.at_req[s][c]) seen[dut.u_net.at_pkt[s][c].addr[BANK_LSB +: T_W]] = 1;
      for (int t = 0; t < N_TIER; t++) kinds += int'(seen[t]);
      if (kinds > 1) tsv_conflicts++;
    end

  initial begin
    int lat;
    core_req = '0;
    for (int c = 0; c < N_CORE; c++) core_pkt[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase = 1;
    // phase 1: exact latencies, one core at a time
    for (int c = 0; c < N_CORE; c++)
      for (int b = 0; b < N_BANK; b++) begin
        access(c, b, 0, 1, lat);
        check(lat == (is_near(c, b) ? 1 : 2 * N_SEQ + 1), $sformatf("write latency core %0d bank %0d", c, b));
        access(c, b, 0, 0, lat);
        check(lat == (is_near(c, b) ? 1 : 2 * N_SEQ + 1), $sformatf("read latency core %0d bank %0d", c, b));
      end
    for (int p = 2; p <= 4; p++) begin
      done_cores = 0;
      phase = p;
      wait (done_cores == N_CORE);
    end
    // TSV count with sharing, one clock TSV: 1 + 1 + 32 stacks * (1 tier bit + 14 + 32)
    check(n_tsv(1, N_BANK, N_TIER, 14, 32) == 1506, "TSV count with sharing");
    check(n_tsv(1, N_BANK, 1, 14, 32) == 2946, "TSV count without sharing");
    check(near_acc > 0 && far_acc > 0, "near and far accesses");
    check(arb_waits > 0, "arbitration waits");
    check(buf_waits > 0, "far packets waiting in a sequential switch");
    check(tsv_conflicts > 0, "shared-TSV competition between tiers");
    $display("reads %0d writes %0d near %0d far %0d", reads, writes, near_acc, far_acc);
    $display("arbitration waits %0d, sequential-switch waits %0d, shared-TSV conflicts %0d, longest grant wait %0d",
             arb_waits, buf_waits, tsv_conflicts, max_wait);
    for (int p = 1; p <= 4; p++)
      $display("phase %0d: %0d accesses, mean latency %0.2f cycles", p, lat_cnt[p],
               real'(lat_sum[p]) / real'(lat_cnt[p]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phases 2-4: all cores together, 80 % of accesses to the near half
  for (genvar c = 0; c < N_CORE; c++) begin : g_core
    initial begin
      int lat, bank, rate_pm, p, slot;
      for (p = 2; p <= 4; p++) begin
        wait (phase == p);
        rate_pm = (p == 2) ? 60 : (p == 3) ? 240 : 1000;   // accesses per 1000 cycles
        for (int i = 0; i < 400; i++) begin
          while ($urandom_range(0, 999) >= rate_pm) @(negedge clk);
          if ($urandom_range(0, 9) < 8) begin
            int s = (home_stack(c) & ~((1 << (S_W - N_SEQ)) - 1)) | $urandom_range(0, (1 << (S_W - N_SEQ)) - 1);
            bank = (s << T_W) | $urandom_range(0, N_TIER - 1);
          end else
            bank = $urandom_range(0, N_BANK - 1);
          slot = $urandom_range(0, 3);
          access(c, bank, slot, ($urandom_range(0, 3) == 0) || !ref_mem.exists(word_addr(c, bank, slot)), lat);
        end
        done_cores++;
      end
    end
  end
endmodule
