// tb_bank_stack: self-checking test of a bank stack with TSV sharing.
// Four tiers of 64-word banks share one bus. Random reads and byte-enabled writes to random
// tiers are compared with a reference memory holding every tier separately: a write must
// change only the addressed tier, every access must be answered one cycle later, and a read
// must return the addressed tier's word.
module tb_bank_stack;
  import mot_pkg::*;

  localparam int unsigned N_TIER     = 4;
  localparam int unsigned BANK_WORDS = 64;
  localparam int unsigned TIER_LSB   = 2 + $clog2(BANK_WORDS);

  logic     clk = 0, rst_n = 0;
  logic     req_i, rvalid_o;
  req_pkt_t pkt_i;
  data_t    rdata_o;

  data_t ref_mem [N_TIER][BANK_WORDS];
  int checks = 0, failures = 0;

  bank_stack #(.N_TIER(N_TIER), .BANK_WORDS(BANK_WORDS), .TIER_LSB(TIER_LSB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit we, input logic [3:0] be, input int tier, input int word,
                        input data_t wd, input bit valid);
    @(negedge clk);
    req_i = valid;
    pkt_i = '{we: we, be: be, addr: 32'(word * 4 + tier * (BANK_WORDS * 4)) | 32'($urandom_range(0, 3)),
              wdata: wd};
    pkt_i.addr[31:TIER_LSB + $clog2(N_TIER)] = '1;  // bits above the stack field are ignored
    @(negedge clk);
    req_i = 0;
    check(rvalid_o == valid, "response one cycle after the access");
    if (valid && !we) check(rdata_o == ref_mem[tier][word], $sformatf("read tier %0d word %0d", tier, word));
    if (valid && we)
      for (int b = 0; b < 4; b++)
        if (be[b]) ref_mem[tier][word][8*b +: 8] = wd[8*b +: 8];
  endtask

  initial begin
    req_i = 0; pkt_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < N_TIER; t++)
      for (int w = 0; w < BANK_WORDS; w++) begin
        ref_mem[t][w] = 0;
        access(1, 4'hf, t, w, 0, 1);
      end
    for (int i = 0; i < 4000; i++)
      access(1'($urandom), 4'($urandom), $urandom_range(0, N_TIER - 1),
             $urandom_range(0, BANK_WORDS - 1), $urandom, $urandom_range(0, 4) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
