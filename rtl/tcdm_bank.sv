// tcdm_bank: one 64 KB bank of the stacked L2 tightly-coupled data memory (TCDM).
//
// A single-port synchronous SRAM of WORDS 32-bit words, written as an array. When cs_i is high
// at a rising clock edge the bank either writes the bytes of wdata_i selected by be_i (we_i=1)
// or reads the addressed word, which appears on rdata_o after that edge and stays until the
// next read. One access per cycle, read latency one cycle. The 64 KB size follows the
// evaluated cluster; the port list, byte enables and one-cycle read are this design's choice
// (the bank's own access time is taken to fit within one network clock period).
module tcdm_bank
  import mot_pkg::*;
#(
  parameter int unsigned WORDS = 16384  // 64 KB of 32-bit words
) (
  input  logic                     clk,
  input  logic                     cs_i,
  input  logic                     we_i,
  input  logic [BE_W-1:0]          be_i,
  input  logic [$clog2(WORDS)-1:0] addr_i,
  input  data_t                    wdata_i,
  output data_t                    rdata_o
);

  data_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (cs_i) begin
      if (we_i) begin
        for (int b = 0; b < BE_W; b++)
          if (be_i[b]) mem[addr_i][8*b +: 8] <= wdata_i[8*b +: 8];
      end else begin
        rdata_o <= mem[addr_i];
      end
    end
  end

endmodule
