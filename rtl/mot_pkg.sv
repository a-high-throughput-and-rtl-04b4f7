// mot_pkg: types and constants shared by the 3-D mesh-of-trees (MoT) interconnect.
//
// A core request travels as a req_pkt_t "packet" (write enable, byte enables, 32-bit byte
// address and write data) from the core through its routing tree and the arbitration tree of
// the target bank stack to the stacked L2 TCDM. The response is the 32-bit read word, qualified
// by a separate valid bit. Packet fields and their widths are this design's choice (a 32-bit
// core with word-wide byte-enabled accesses); the packet idea itself follows the MoT network.
//
// n_tsv() evaluates the TSV count of one 3-D stack with TSV sharing among the banks of a bank
// stack: Nc clock TSVs + 1 reset TSV + (Nbank/Ntier) * (log2(Ntier) + address bits + data bits).
package mot_pkg;

  localparam int unsigned ADDR_W = 32;          // core byte address
  localparam int unsigned DATA_W = 32;          // word width of the L2 TCDM
  localparam int unsigned BE_W   = DATA_W / 8;  // byte enables

  typedef logic [DATA_W-1:0] data_t;

  typedef struct packed {
    logic              we;     // 1: write, 0: read
    logic [BE_W-1:0]   be;     // byte enables of a write
    logic [ADDR_W-1:0] addr;   // byte address
    data_t             wdata;  // write data
  } req_pkt_t;

  // Integer log2 that gives 0 for 1 (tier ID width of a single-tier stack is 0 bits).
  function automatic int unsigned log2i(input int unsigned n);
    int unsigned r = 0;
    while ((32'd1 << r) < n) r++;
    return r;
  endfunction

  // TSV count of the memory stack with TSV sharing (one bus per bank stack).
  function automatic int unsigned n_tsv(input int unsigned n_clk, input int unsigned n_bank,
                                        input int unsigned n_tier, input int unsigned nb_addr,
                                        input int unsigned nb_data);
    return n_clk + 1 + (n_bank / n_tier) * (log2i(n_tier) + nb_addr + nb_data);
  endfunction

endpackage
