// mot_network: the 3-D mesh-of-trees interconnect between N_CORE cores and N_STACK bank stacks.
//
// Every core owns a routing tree with N_STACK leaves and every bank stack owns an arbitration
// tree with N_CORE leaves; leaf s of core c's routing tree is wired to leaf c of stack s's
// arbitration tree, so each core has a private path to each stack and the only contention is
// inside the arbitration trees (round robin, starvation free). The first N_SEQ levels of each
// routing tree are sequential routing switches: a core reaches the bank stacks of its own half
// (quarter, ...) combinationally in one cycle and the others in up to 2*N_SEQ+1 cycles.
//
// Core c's home stack, which decides which side of a sequential switch is near, is
// c*N_STACK/N_CORE: the cores are spread evenly over the bank stacks above them. The stack
// index is the address field at STACK_LSB, above the tier ID and the word offset.
//
// Interface: per core a request link (core_req/core_pkt/core_gnt, a request is taken when req
// and gnt are both high) and a response (core_rvalid/core_rdata); per stack the TSV-bus link
// (stk_req/stk_pkt/stk_gnt) and its response (stk_rvalid/stk_rdata), expected one cycle after
// the grant. A core may have one access in flight. Clock clk, asynchronous active-low reset.
module mot_network
  import mot_pkg::*;
#(
  parameter int unsigned N_CORE    = 32,  // cores
  parameter int unsigned N_STACK   = 32,  // bank stacks (banks / tiers)
  parameter int unsigned N_SEQ     = 1,   // routing levels of sequential routing switches
  parameter int unsigned STACK_LSB = 17   // address bit of the stack index LSB
) (
  input  logic               clk,
  input  logic               rst_n,
  // cores
  input  logic [N_CORE-1:0]  core_req,
  input  req_pkt_t           core_pkt    [N_CORE],
  output logic [N_CORE-1:0]  core_gnt,
  output logic [N_CORE-1:0]  core_rvalid,
  output data_t              core_rdata  [N_CORE],
  // bank stacks
  output logic [N_STACK-1:0] stk_req,
  output req_pkt_t           stk_pkt     [N_STACK],
  input  logic [N_STACK-1:0] stk_gnt,
  input  logic [N_STACK-1:0] stk_rvalid,
  input  data_t              stk_rdata   [N_STACK]
);

  // mesh wiring: index [core][stack] as seen from the routing trees,
  // [stack][core] as seen from the arbitration trees
  logic [N_STACK-1:0] rt_req    [N_CORE];
  req_pkt_t           rt_pkt    [N_CORE][N_STACK];
  logic [N_STACK-1:0] rt_gnt    [N_CORE];
  logic [N_STACK-1:0] rt_rvalid [N_CORE];
  data_t              rt_rdata  [N_CORE][N_STACK];

  logic [N_CORE-1:0]  at_req    [N_STACK];
  req_pkt_t           at_pkt    [N_STACK][N_CORE];
  logic [N_CORE-1:0]  at_gnt    [N_STACK];
  logic [N_CORE-1:0]  at_rvalid [N_STACK];
  data_t              at_rdata  [N_STACK][N_CORE];

  for (genvar c = 0; c < N_CORE; c++) begin : g_core
    routing_tree #(
      .N_LEAF  (N_STACK),
      .N_SEQ   (N_SEQ),
      .HOME    (c * N_STACK / N_CORE),
      .ADDR_LSB(STACK_LSB)
    ) u_rt (
      .clk, .rst_n,
      .req_i   (core_req[c]),
      .pkt_i   (core_pkt[c]),
      .gnt_o   (core_gnt[c]),
      .rvalid_o(core_rvalid[c]),
      .rdata_o (core_rdata[c]),
      .req_o   (rt_req[c]),
      .pkt_o   (rt_pkt[c]),
      .gnt_i   (rt_gnt[c]),
      .rvalid_i(rt_rvalid[c]),
      .rdata_i (rt_rdata[c])
    );

    for (genvar s = 0; s < N_STACK; s++) begin : g_link
      assign at_req[s][c]    = rt_req[c][s];
      assign at_pkt[s][c]    = rt_pkt[c][s];
      assign rt_gnt[c][s]    = at_gnt[s][c];
      assign rt_rvalid[c][s] = at_rvalid[s][c];
      assign rt_rdata[c][s]  = at_rdata[s][c];
    end
  end

  for (genvar s = 0; s < N_STACK; s++) begin : g_stack
    arb_tree #(.N_LEAF(N_CORE)) u_at (
      .clk, .rst_n,
      .req_i   (at_req[s]),
      .pkt_i   (at_pkt[s]),
      .gnt_o   (at_gnt[s]),
      .rvalid_o(at_rvalid[s]),
      .rdata_o (at_rdata[s]),
      .req_o   (stk_req[s]),
      .pkt_o   (stk_pkt[s]),
      .gnt_i   (stk_gnt[s]),
      .rvalid_i(stk_rvalid[s]),
      .rdata_i (stk_rdata[s])
    );
  end

endmodule
