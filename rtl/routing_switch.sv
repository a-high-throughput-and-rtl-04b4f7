// routing_switch: combinational 1-to-2 routing switch of a MoT routing tree.
//
// Forward direction: the packet arriving from the core side is steered to output 0 or 1 by a
// single address bit (SEL_BIT), exactly as a node of a binary routing tree decodes one bit of
// the target bank index. The grant of the chosen output is returned to the core side in the
// same cycle. Backward direction: the read responses of the two subtrees are merged; since a
// core has at most one transaction in flight, at most one side returns a response per cycle.
//
// Interface: req_i/pkt_i/gnt_o on the core side, req_o/pkt_o/gnt_i on the memory side, and
// rvalid/rdata in the opposite direction. No clock: every path is combinational, as in the
// plain MoT switch. The response merge by valid bit is this design's choice.
module routing_switch
  import mot_pkg::*;
#(
  parameter int unsigned SEL_BIT = 0  // address bit that selects the output
) (
  // core side
  input  logic       req_i,
  input  req_pkt_t   pkt_i,
  output logic       gnt_o,
  output logic       rvalid_o,
  output data_t      rdata_o,
  // memory side
  output logic [1:0] req_o,
  output req_pkt_t   pkt_o [2],
  input  logic [1:0] gnt_i,
  input  logic [1:0] rvalid_i,
  input  data_t      rdata_i [2]
);

  logic sel;

  assign sel = pkt_i.addr[SEL_BIT];

  // forward: packet to the selected output
  always_comb begin
    req_o      = 2'b00;
    req_o[sel] = req_i;
  end
  assign pkt_o[0] = pkt_i;
  assign pkt_o[1] = pkt_i;

  // grant of the selected output back to the core side
  assign gnt_o = req_i & gnt_i[sel];

  // backward: merge the responses of the two subtrees
  assign rvalid_o = |rvalid_i;
  assign rdata_o  = rvalid_i[1] ? rdata_i[1] : rdata_i[0];

endmodule
