// routing_tree: one core's binary routing tree in the 3-D MoT network.
//
// N_LEAF-1 routing switches form a binary tree whose root faces the core and whose N_LEAF
// leaves face the arbitration trees of the N_LEAF bank stacks. The switch at depth d decodes
// bit (LEAF_W-1-d) of the leaf index, which sits in the packet address at ADDR_LSB; so the root
// splits the banks into two halves, the next level into quarters, and so on.
//
// In the first N_SEQ levels every switch is a sequential routing switch. Its far output is the
// half that does not contain the core's HOME leaf (the bank stack above the core). A bank
// reached through near outputs only is one cycle away; each far output passed adds one cycle
// each way, so the farthest banks take 2*N_SEQ+1 cycles and N_LEAF/2^N_SEQ leaves are closest.
// The deeper levels use combinational routing switches.
//
// Interface: the core-side link (req_i, pkt_i, gnt_o, rvalid_o, rdata_o) and one link per leaf
// (req_o[k], pkt_o[k], gnt_i[k], rvalid_i[k], rdata_i[k]). Heap numbering: node 1 is the root,
// node n feeds 2n (bit 0) and 2n+1 (bit 1), node N_LEAF+k is leaf k.
module routing_tree
  import mot_pkg::*;
#(
  parameter int unsigned N_LEAF   = 32,  // bank stacks reached by the tree (power of two, >= 2)
  parameter int unsigned N_SEQ    = 1,   // levels built of sequential routing switches
  parameter int unsigned HOME     = 0,   // leaf index nearest to the core
  parameter int unsigned ADDR_LSB = 17   // address bit of the leaf index LSB
) (
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic              req_i,
  input  req_pkt_t          pkt_i,
  output logic              gnt_o,
  output logic              rvalid_o,
  output data_t             rdata_o,
  // leaf side
  output logic [N_LEAF-1:0] req_o,
  output req_pkt_t          pkt_o    [N_LEAF],
  input  logic [N_LEAF-1:0] gnt_i,
  input  logic [N_LEAF-1:0] rvalid_i,
  input  data_t             rdata_i  [N_LEAF]
);

  localparam int unsigned LEAF_W = $clog2(N_LEAF);
  localparam logic [31:0] HOME_V = 32'(HOME);

  // Every switch n owns the links to its two children (c_*); a child switch m reads its
  // core-side link from its parent's block, g_sw[m/2].c_*[m%2].
  for (genvar n = 1; n < N_LEAF; n++) begin : g_sw
    localparam int unsigned DEPTH = $clog2(n + 1) - 1;
    localparam int unsigned BIT   = LEAF_W - 1 - DEPTH;

    logic       u_req;
    req_pkt_t   u_pkt;
    logic       u_gnt;
    logic       u_rvalid;
    data_t      u_rdata;
    logic [1:0] c_req;
    req_pkt_t   c_pkt    [2];
    logic [1:0] c_gnt;
    logic [1:0] c_rvalid;
    data_t      c_rdata  [2];

    if (n == 1) begin : g_root
      assign u_req    = req_i;
      assign u_pkt    = pkt_i;
      assign gnt_o    = u_gnt;
      assign rvalid_o = u_rvalid;
      assign rdata_o  = u_rdata;
    end else begin : g_inner
      assign u_req = g_sw[n/2].c_req[n%2];
      assign u_pkt = g_sw[n/2].c_pkt[n%2];
    end

    for (genvar k = 0; k < 2; k++) begin : g_ch
      if (2*n + k >= N_LEAF) begin : g_leaf
        assign req_o[2*n+k-N_LEAF]   = c_req[k];
        assign pkt_o[2*n+k-N_LEAF]   = c_pkt[k];
        assign c_gnt[k]              = gnt_i[2*n+k-N_LEAF];
        assign c_rvalid[k]           = rvalid_i[2*n+k-N_LEAF];
        assign c_rdata[k]            = rdata_i[2*n+k-N_LEAF];
      end else begin : g_node
        assign c_gnt[k]              = g_sw[2*n+k].u_gnt;
        assign c_rvalid[k]           = g_sw[2*n+k].u_rvalid;
        assign c_rdata[k]            = g_sw[2*n+k].u_rdata;
      end
    end

    if (DEPTH < N_SEQ) begin : g_seq
      seq_routing_switch #(
        .SEL_BIT(ADDR_LSB + BIT),
        .FAR    (~HOME_V[BIT])
      ) u_sw (
        .clk, .rst_n,
        .req_i(u_req), .pkt_i(u_pkt), .gnt_o(u_gnt), .rvalid_o(u_rvalid), .rdata_o(u_rdata),
        .req_o(c_req), .pkt_o(c_pkt), .gnt_i(c_gnt), .rvalid_i(c_rvalid), .rdata_i(c_rdata)
      );
    end else begin : g_comb
      routing_switch #(
        .SEL_BIT(ADDR_LSB + BIT)
      ) u_sw (
        .req_i(u_req), .pkt_i(u_pkt), .gnt_o(u_gnt), .rvalid_o(u_rvalid), .rdata_o(u_rdata),
        .req_o(c_req), .pkt_o(c_pkt), .gnt_i(c_gnt), .rvalid_i(c_rvalid), .rdata_i(c_rdata)
      );
    end
  end

endmodule
