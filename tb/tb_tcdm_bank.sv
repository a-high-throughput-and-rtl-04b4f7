// tb_tcdm_bank: self-checking test of one TCDM bank.
// Random reads and byte-enabled writes are compared against a reference array kept by the
// testbench; the read data must appear exactly one cycle after the read and stay stable
// during a following write.
module tb_tcdm_bank;
  import mot_pkg::*;

  localparam int unsigned WORDS = 256;

  logic                     clk = 0;
  logic                     cs_i, we_i;
  logic [BE_W-1:0]          be_i;
  logic [$clog2(WORDS)-1:0] addr_i;
  data_t                    wdata_i, rdata_o;

  data_t ref_mem [WORDS];
  int checks = 0, failures = 0;

  tcdm_bank #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t expect_q;
    cs_i = 0; we_i = 0; be_i = 0; addr_i = 0; wdata_i = 0;
    // fill the bank
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      cs_i = 1; we_i = 1; be_i = '1; addr_i = a[$clog2(WORDS)-1:0]; wdata_i = $urandom;
      ref_mem[a] = wdata_i;
    end
    @(negedge clk);
    cs_i = 1; we_i = 0; addr_i = 0;
    expect_q = ref_mem[0];
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      cs_i = 1'($urandom_range(0, 3) != 0);
      we_i = 1'($urandom);
      be_i = 4'($urandom);
      addr_i = $urandom;
      wdata_i = $urandom;
      if (cs_i && !we_i) expect_q = ref_mem[addr_i];
      if (cs_i && we_i)
        for (int b = 0; b < BE_W; b++)
          if (be_i[b]) ref_mem[addr_i][8*b +: 8] = wdata_i[8*b +: 8];
      @(posedge clk); #1;
      checks++;
      if (rdata_o !== expect_q) begin
        failures++;
        $display("FAIL cycle %0d: rdata %h expected %h", i, rdata_o, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
