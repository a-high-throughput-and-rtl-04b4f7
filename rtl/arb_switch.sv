// arb_switch: 2-to-1 round-robin arbitration switch of a MoT arbitration tree.
//
// Forward direction: when both inputs request, the input holding the priority token wins;
// after every grant the token moves to the other input, so neither input can starve. A lone
// request wins at once. The grant from the memory side is passed back, combinationally, to
// the winning input only. Backward direction: the switch remembers which input it granted
// (one flip-flop) and steers the response, which the bank returns one cycle after the grant,
// to that input.
//
// Interface: req_i/pkt_i/gnt_o per input, req_o/pkt_o/gnt_i on the memory side, rvalid/rdata
// backward. Clock clk (rising edge), asynchronous active-low reset, after which input 0 holds
// the token. The token and the one-cycle response alignment are this design's choices.
module arb_switch
  import mot_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // core side (two inputs)
  input  logic [1:0] req_i,
  input  req_pkt_t   pkt_i [2],
  output logic [1:0] gnt_o,
  output logic [1:0] rvalid_o,
  output data_t      rdata_o [2],
  // memory side
  output logic       req_o,
  output req_pkt_t   pkt_o,
  input  logic       gnt_i,
  input  logic       rvalid_i,
  input  data_t      rdata_i
);

  logic prio_q;   // input that wins a tie
  logic win;      // input selected in this cycle
  logic resp_q;   // input granted in the previous cycle

  // winner of this cycle
  always_comb begin
    unique case (req_i)
      2'b01:   win = 1'b0;
      2'b10:   win = 1'b1;
      default: win = prio_q;
    endcase
  end

  // forward: the winner's packet goes on
  assign req_o = |req_i;
  assign pkt_o = pkt_i[win];

  // grant back to the winner only
  always_comb begin
    gnt_o      = 2'b00;
    gnt_o[win] = gnt_i & req_i[win];
  end

  // backward: response to the input granted in the previous cycle
  always_comb begin
    rvalid_o         = 2'b00;
    rvalid_o[resp_q] = rvalid_i;
  end
  assign rdata_o[0] = rdata_i;
  assign rdata_o[1] = rdata_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio_q <= 1'b0;
      resp_q <= 1'b0;
    end else if (req_o && gnt_i) begin
      prio_q <= ~win;
      resp_q <= win;
    end
  end

  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_o));
  a_gnt_req:    assert property (@(posedge clk) disable iff (!rst_n) (gnt_o & ~req_i) == 2'b00);

endmodule
