// arb_tree: the binary arbitration tree in front of one bank stack of the 3-D MoT network.
//
// N_LEAF-1 round-robin arbitration switches reduce the requests of the N_LEAF cores to the
// one request that reaches the bank stack's TSV bus in a cycle. Because every switch passes
// the priority to its other input after a grant, each core is served within N_LEAF grants
// when all cores compete. The tree is combinational in the forward direction; the grant of
// the bank side ripples back to the winning core in the same cycle. Each switch keeps the
// input it granted, so the response returned by the bank one cycle later retraces the path.
//
// Interface: one link per core (req_i[k], pkt_i[k], gnt_o[k], rvalid_o[k], rdata_o[k]) and the
// bank-side link (req_o, pkt_o, gnt_i, rvalid_i, rdata_i). Heap numbering: node 1 is the root,
// node n is fed by 2n and 2n+1, node N_LEAF+k is core k.
module arb_tree
  import mot_pkg::*;
#(
  parameter int unsigned N_LEAF = 32  // cores (power of two, >= 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic [N_LEAF-1:0] req_i,
  input  req_pkt_t          pkt_i    [N_LEAF],
  output logic [N_LEAF-1:0] gnt_o,
  output logic [N_LEAF-1:0] rvalid_o,
  output data_t             rdata_o  [N_LEAF],
  // bank side
  output logic              req_o,
  output req_pkt_t          pkt_o,
  input  logic              gnt_i,
  input  logic              rvalid_i,
  input  data_t             rdata_i
);

  // Every switch n owns its bank-side link (d_*) and its two core-side links (c_*); a switch
  // m reads the grant and response of its bank-side link from its parent, g_sw[m/2].
  for (genvar n = 1; n < N_LEAF; n++) begin : g_sw
    logic       d_req;
    req_pkt_t   d_pkt;
    logic       d_gnt;
    logic       d_rvalid;
    data_t      d_rdata;
    logic [1:0] c_req;
    req_pkt_t   c_pkt    [2];
    logic [1:0] c_gnt;
    logic [1:0] c_rvalid;
    data_t      c_rdata  [2];

    if (n == 1) begin : g_root
      assign req_o    = d_req;
      assign pkt_o    = d_pkt;
      assign d_gnt    = gnt_i;
      assign d_rvalid = rvalid_i;
      assign d_rdata  = rdata_i;
    end else begin : g_inner
      assign d_gnt    = g_sw[n/2].c_gnt[n%2];
      assign d_rvalid = g_sw[n/2].c_rvalid[n%2];
      assign d_rdata  = g_sw[n/2].c_rdata[n%2];
    end

    for (genvar k = 0; k < 2; k++) begin : g_ch
      if (2*n + k >= N_LEAF) begin : g_leaf
        assign c_req[k]                = req_i[2*n+k-N_LEAF];
        assign c_pkt[k]                = pkt_i[2*n+k-N_LEAF];
        assign gnt_o[2*n+k-N_LEAF]     = c_gnt[k];
        assign rvalid_o[2*n+k-N_LEAF]  = c_rvalid[k];
        assign rdata_o[2*n+k-N_LEAF]   = c_rdata[k];
      end else begin : g_node
        assign c_req[k]                = g_sw[2*n+k].d_req;
        assign c_pkt[k]                = g_sw[2*n+k].d_pkt;
      end
    end

    arb_switch u_sw (
      .clk, .rst_n,
      .req_i(c_req), .pkt_i(c_pkt), .gnt_o(c_gnt), .rvalid_o(c_rvalid), .rdata_o(c_rdata),
      .req_o(d_req), .pkt_o(d_pkt), .gnt_i(d_gnt), .rvalid_i(d_rvalid), .rdata_i(d_rdata)
    );
  end

endmodule
