// seq_routing_switch: sequential routing switch of the 3-D MoT routing tree.
//
// It has the ports of routing_switch and can replace one without changing the network. One of
// its two outputs (FAR) leads to the half of the banks that is farther from the core; on that
// side the switch holds a forward flip-flop stage (packet plus valid) and a backward flip-flop
// stage (response valid plus read data). Packets to the NEAR side pass combinationally. So a
// near access keeps its single-cycle latency, and an access through the far side gains one
// cycle on the way to the memory and one cycle on the way back, which cuts the long
// horizontal wire into two clock periods.
//
// Forward stage: a one-entry pipeline register with a valid/grant handshake. The core side is
// granted a far packet whenever the register is empty or is being emptied in this cycle; the
// register then presents the packet downstream until the arbitration tree grants it.
// Backward stage: the response of the far side is registered for one cycle.
//
// Clocking: both stages use clk, rising edge, with asynchronous active-low reset. The skewed
// backward clock of the original circuit is modelled as the same clock; the cycle counts
// (near 1, far 3 per switch level) are unchanged by that choice.
module seq_routing_switch
  import mot_pkg::*;
#(
  parameter int unsigned SEL_BIT = 0,  // address bit that selects the output
  parameter bit          FAR     = 1'b1 // output that leads to the far bank half
) (
  input  logic       clk,
  input  logic       rst_n,
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

  localparam bit NEAR = ~FAR;

  logic     sel;
  logic     far_ready;
  logic     fwd_valid_q;
  req_pkt_t fwd_pkt_q;
  logic     bwd_valid_q;
  data_t    bwd_data_q;

  assign sel       = pkt_i.addr[SEL_BIT];
  assign far_ready = ~fwd_valid_q | gnt_i[FAR];

  // forward: near packets pass, far packets come from the forward stage
  always_comb begin
    req_o       = 2'b00;
    req_o[NEAR] = req_i & (sel == NEAR);
    req_o[FAR]  = fwd_valid_q;
  end
  always_comb begin
    pkt_o[NEAR] = pkt_i;
    pkt_o[FAR]  = fwd_pkt_q;
  end

  // grant: from the near side, or from the forward stage having room
  assign gnt_o = req_i & ((sel == NEAR) ? gnt_i[NEAR] : far_ready);

  // backward: near response or the registered far response
  assign rvalid_o = rvalid_i[NEAR] | bwd_valid_q;
  assign rdata_o  = bwd_valid_q ? bwd_data_q : rdata_i[NEAR];

  // forward flip-flop stage (core side to memory side)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_valid_q <= 1'b0;
      fwd_pkt_q   <= '0;
    end else if (far_ready) begin
      fwd_valid_q <= req_i & (sel == FAR);
      if (req_i && sel == FAR) fwd_pkt_q <= pkt_i;
    end
  end

  // backward flip-flop stage (memory side to core side)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bwd_valid_q <= 1'b0;
      bwd_data_q  <= '0;
    end else begin
      bwd_valid_q <= rvalid_i[FAR];
      if (rvalid_i[FAR]) bwd_data_q <= rdata_i[FAR];
    end
  end

  // a buffered packet stays unchanged until it is granted
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    fwd_valid_q && !gnt_i[FAR] |=> fwd_valid_q && $stable(fwd_pkt_q));

endmodule
