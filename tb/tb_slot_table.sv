`timescale 1ns / 1ps
// Test of slot_table: entries written through the write port (its own
// pulse clock, as the extractor's click) into both banks are read back on
// the read port one clock after the address; writes with wen low are
// ignored.
//
// The two-bank layout follows the thesis design; the data are random.
module tb_slot_table;
  import mc_pkg::*;
  logic wclk = 1'b0, wen, clk = 1'b0;
  logic [SLOT_CNT_W:0] waddr, raddr;
  mc_word_t wdata, rdata;
  mc_word_t ref_mem [2**(SLOT_CNT_W+1)];
  int checks = 0, failures = 0;

  slot_table dut (.*);
  always #5 clk = ~clk;

  task automatic wr(input int a, input mc_word_t d, input bit en);
    waddr = (SLOT_CNT_W+1)'(a); wdata = d; wen = en;
    #2 wclk = 1'b1;
    #2 wclk = 1'b0;
    if (en) ref_mem[a] = d;
    #1;
  endtask

  initial begin
    wen = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < 2**(SLOT_CNT_W+1); a++) wr(a, mc_word_t'($urandom), 1'b1);
    for (int k = 0; k < 200; k++) wr($urandom_range(0, 2**(SLOT_CNT_W+1) - 1), mc_word_t'($urandom), k % 3 != 0);
    for (int a = 0; a < 2**(SLOT_CNT_W+1); a += 3) begin
      @(negedge clk) raddr = (SLOT_CNT_W+1)'(a);
      // registered read: until the next clock edge the old word stays
      #1;
      checks++;
      if (a > 0 && rdata != ref_mem[a - 3]) begin failures++; $display("FAIL: read not registered at %0d", a); end
      @(negedge clk);
      checks++;
      if (rdata != ref_mem[a]) begin failures++; $display("FAIL: address %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
