// cluster_check: traffic generator and checker for one configuration of mot3d_cluster, used by
// tb_mot3d_tiers and tb_mot3d_tier1 to run other tier counts.
//
// 32 core models first access every bank one at a time (write, then read back) and check the
// latency: 1 cycle on the core's side of every sequential level, 2*N_SEQ+1 cycles at most
// otherwise (exactly 1 + 2 * far levels). Then all cores issue ACCESSES random accesses each,
// back to back, 80 % to their near half; every read is compared with a reference memory. The
// module counts arbitration waits and, with more than one tier, shared-TSV competition between
// tiers, and counts a failure if one of them never happened. done rises at the end; checks and
// failures then hold the totals.
module cluster_check
  import mot_pkg::*;
#(
  parameter int unsigned N_TIER   = 2,
  parameter int unsigned N_SEQ    = 1,
  parameter int unsigned ACCESSES = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned N_CORE   = 32;
  localparam int unsigned N_BANK   = 64;
  localparam int unsigned N_STACK  = N_BANK / N_TIER;
  localparam int unsigned BANK_LSB = 16;
  localparam int unsigned T_W      = log2i(N_TIER);
  localparam int unsigned S_W      = $clog2(N_STACK);

  logic [N_CORE-1:0] core_req, core_gnt, core_rvalid;
  req_pkt_t          core_pkt [N_CORE];
  data_t             core_rdata [N_CORE];

  int arb_waits = 0, tsv_conflicts = 0, done_cores = 0, phase = 0;
  data_t ref_mem [int unsigned];

  mot3d_cluster #(.N_TIER(N_TIER), .N_SEQ(N_SEQ)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [N_TIER=%0d N_SEQ=%0d] %s at %0t", N_TIER, N_SEQ, what, $time);
    end
  endtask

  function automatic int far_levels(input int c, input int bank);
    int s = bank >> T_W, h = c * N_STACK / N_CORE, n = 0;
    for (int l = 0; l < int'(N_SEQ); l++)
      if (((s >> (S_W - 1 - l)) & 1) != ((h >> (S_W - 1 - l)) & 1)) n++;
    return n;
  endfunction

  function automatic int unsigned word_addr(input int c, input int bank, input int slot);
    return (bank << (BANK_LSB - 2)) | (slot << 5) | c;
  endfunction

  task automatic access(input int c, input int bank, input int slot, input bit we, output int lat);
    int unsigned waddr = word_addr(c, bank, slot);
    bit waited = 0;
    @(negedge clk);
    core_pkt[c].we    = we;
    core_pkt[c].be    = !we ? 4'h0 : ref_mem.exists(waddr) ? 4'($urandom_range(1, 15)) : 4'hf;
    core_pkt[c].addr  = {waddr[29:0], 2'b00};
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
    end else
      check(core_rdata[c] == ref_mem[waddr], $sformatf("core %0d read bank %0d", c, bank));
  endtask

  if (N_TIER > 1) begin : g_tsv_mon
    always @(posedge clk) if (rst_n)
      for (int s = 0; s < int'(N_STACK); s++) begin
        bit seen [N_TIER];
        int kinds;
        kinds = 0;
        for (int t = 0; t < int'(N_TIER); t++) seen[t] = 0;
        for (int c = 0; c < int'(N_CORE); c++)
          if (dut.u_net.at_req[s][c]) seen[dut.u_net.at_pkt[s][c].addr[BANK_LSB +: T_W]] = 1;
        for (int t = 0; t < int'(N_TIER); t++) kinds += int'(seen[t]);
        if (kinds > 1) tsv_conflicts++;
      end
  end

  initial begin
    int lat;
    done = 0; checks = 0; failures = 0;
    core_req = '0;
    for (int c = 0; c < N_CORE; c++) core_pkt[c] = '0;
    wait (rst_n);
    for (int c = 0; c < N_CORE; c++)
      for (int b = 0; b < N_BANK; b++) begin
        access(c, b, 0, 1, lat);
        check(lat == 1 + 2 * far_levels(c, b), $sformatf("write latency %0d core %0d bank %0d", lat, c, b));
        access(c, b, 0, 0, lat);
        check(lat == 1 + 2 * far_levels(c, b), $sformatf("read latency %0d core %0d bank %0d", lat, c, b));
      end
    phase = 1;
    wait (done_cores == N_CORE);
    check(arb_waits > 0, "arbitration waits happened");
    if (N_TIER > 1) check(tsv_conflicts > 0, "shared-TSV competition happened");
    $display("[N_TIER=%0d N_SEQ=%0d] arbitration waits %0d, shared-TSV conflicts %0d",
             N_TIER, N_SEQ, arb_waits, tsv_conflicts);
    done = 1;
  end

  for (genvar c = 0; c < N_CORE; c++) begin : g_core
    initial begin
      int lat, bank, slot, s;
      wait (phase == 1);
      for (int i = 0; i < int'(ACCESSES); i++) begin
        if (N_SEQ > 0 && $urandom_range(0, 9) < 8) begin
          s = ((c * N_STACK / N_CORE) & ~((1 << (S_W - N_SEQ)) - 1)) | $urandom_range(0, (1 << (S_W - N_SEQ)) - 1);
          bank = (s << T_W) | $urandom_range(0, N_TIER - 1);
        end else
          bank = $urandom_range(0, N_BANK - 1);
        slot = $urandom_range(0, 3);
        access(c, bank, slot, ($urandom_range(0, 3) == 0) || !ref_mem.exists(word_addr(c, bank, slot)), lat);
      end
      done_cores++;
    end
  end
endmodule
