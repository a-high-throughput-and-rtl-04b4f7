// bank_stack: N_TIER TCDM banks stacked vertically that share one set of TSVs.
//
// With TSV sharing, the banks that sit directly on top of each other in the memory tiers form
// a bank stack, and the arbitration tree of the MoT network drives a single TSV bus for the
// whole stack: valid, tier ID, word address, byte enables, write enable and write data down,
// read data up. Every tier compares the tier ID with its own number and only the addressed bank
// is selected; the stack therefore serves one access per cycle, and cores that target
// different tiers of the same stack contend for the shared TSVs in the arbitration tree.
//
// The response (rvalid_o, rdata_o) follows one cycle after the access; reads return the word,
// writes return an acknowledge. The tier ID is the low log2(N_TIER) bits of the bank index,
// at address bit TIER_LSB; the word offset sits at address bit 2. Address layout and the
// acknowledge of writes are this design's choices. Clock clk, asynchronous active-low reset.
module bank_stack
  import mot_pkg::*;
#(
  parameter int unsigned N_TIER     = 2,      // stacked memory tiers (banks per stack)
  parameter int unsigned BANK_WORDS = 16384,  // words per bank
  parameter int unsigned TIER_LSB   = 16      // address bit of the tier ID LSB
) (
  input  logic     clk,
  input  logic     rst_n,
  // shared TSV bus from the arbitration tree
  input  logic     req_i,
  input  req_pkt_t pkt_i,
  output logic     rvalid_o,
  output data_t    rdata_o
);

  localparam int unsigned OFF_W  = $clog2(BANK_WORDS);
  localparam int unsigned TIER_W = log2i(N_TIER);
  localparam int unsigned TID_W  = (TIER_W > 0) ? TIER_W : 1;

  logic [TID_W-1:0] tier_id;    // tier ID on the shared TSVs
  logic [TID_W-1:0] tier_q;     // tier that was accessed in the previous cycle
  logic             valid_q;
  data_t            bank_rdata [N_TIER];

  if (TIER_W > 0) begin : g_tid
    assign tier_id = pkt_i.addr[TIER_LSB +: TIER_W];
  end else begin : g_single
    assign tier_id = '0;
  end

  for (genvar t = 0; t < N_TIER; t++) begin : g_tier
    tcdm_bank #(.WORDS(BANK_WORDS)) u_bank (
      .clk,
      .cs_i   (req_i && tier_id == TID_W'(t)),
      .we_i   (pkt_i.we),
      .be_i   (pkt_i.be),
      .addr_i (pkt_i.addr[2 +: OFF_W]),
      .wdata_i(pkt_i.wdata),
      .rdata_o(bank_rdata[t])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      tier_q  <= '0;
    end else begin
      valid_q <= req_i;
      if (req_i) tier_q <= tier_id;
    end
  end

  assign rvalid_o = valid_q;
  assign rdata_o  = bank_rdata[tier_q];

endmodule
