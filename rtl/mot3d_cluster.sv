// mot3d_cluster: multi-core cluster interconnect with a 3-D stacked, multi-banked L2 TCDM.
//
// N_CORE cores on the logic tier reach N_BANK shared TCDM banks spread over N_TIER memory tiers
// stacked on top. The banks directly above each other form N_BANK/N_TIER bank stacks that share
// one TSV bus each (TSV sharing); the mesh-of-trees network in the middle of the logic tier
// connects every core to every bank stack, with sequential routing switches in the first N_SEQ
// levels of each routing tree (SRS). Defaults: 32 cores, 64 banks of 64 KB (4 MB in all), two
// tiers, one sequential level, the configuration that combines both techniques.
//
// Address map (byte address): [1:0] byte, [2 +: 14] word within the bank, then the bank index,
// whose low log2(N_TIER) bits are the tier and whose upper bits are the bank stack. Each bank
// thus holds one contiguous 64 KB region. Latency from request to response with no contention:
// one cycle to a bank stack on the core's own side of every sequential level, 2*N_SEQ+1 cycles
// to the farthest ones. A request is taken when core_req and core_gnt are high in the same
// cycle; a core keeps its request and packet stable until then and issues its next access
// after the response (core_rvalid). The cores themselves (processors with their L1 caches) are
// outside this module. Clock clk, asynchronous active-low reset rst_n.
module mot3d_cluster
  import mot_pkg::*;
#(
  parameter int unsigned N_CORE     = 32,     // cores
  parameter int unsigned N_BANK     = 64,     // L2 TCDM banks
  parameter int unsigned N_TIER     = 2,      // stacked memory tiers, banks per bank stack
  parameter int unsigned N_SEQ      = 1,      // routing levels of sequential routing switches
  parameter int unsigned BANK_BYTES = 65536   // bytes per bank
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_CORE-1:0] core_req,
  input  req_pkt_t          core_pkt    [N_CORE],
  output logic [N_CORE-1:0] core_gnt,
  output logic [N_CORE-1:0] core_rvalid,
  output data_t             core_rdata  [N_CORE]
);

  localparam int unsigned N_STACK    = N_BANK / N_TIER;
  localparam int unsigned BANK_WORDS = BANK_BYTES / (DATA_W / 8);
  localparam int unsigned TIER_LSB   = 2 + $clog2(BANK_WORDS);
  localparam int unsigned STACK_LSB  = TIER_LSB + log2i(N_TIER);

  logic [N_STACK-1:0] stk_req;
  req_pkt_t           stk_pkt    [N_STACK];
  logic [N_STACK-1:0] stk_rvalid;
  data_t              stk_rdata  [N_STACK];

  mot_network #(
    .N_CORE   (N_CORE),
    .N_STACK  (N_STACK),
    .N_SEQ    (N_SEQ),
    .STACK_LSB(STACK_LSB)
  ) u_net (
    .clk, .rst_n,
    .core_req, .core_pkt, .core_gnt, .core_rvalid, .core_rdata,
    .stk_req, .stk_pkt,
    .stk_gnt   ('1),           // a bank stack takes one access every cycle
    .stk_rvalid, .stk_rdata
  );

  for (genvar s = 0; s < N_STACK; s++) begin : g_stack
    bank_stack #(
      .N_TIER    (N_TIER),
      .BANK_WORDS(BANK_WORDS),
      .TIER_LSB  (TIER_LSB)
    ) u_stack (
      .clk, .rst_n,
      .req_i   (stk_req[s]),
      .pkt_i   (stk_pkt[s]),
      .rvalid_o(stk_rvalid[s]),
      .rdata_o (stk_rdata[s])
    );
  end

  initial begin
    assert (N_BANK % N_TIER == 0 && N_STACK >= 2 && N_SEQ <= $clog2(N_STACK)
            && N_SEQ <= $clog2(N_CORE))
      else $error("mot3d_cluster: unsupported parameter combination");
  end

endmodule
