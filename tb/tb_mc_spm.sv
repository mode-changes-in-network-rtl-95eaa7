`timescale 1ns / 1ps
// Test of the mode change SPM: words written through the OCPcore port (DVA
// in the next cycle) are read back on the controller's synchronous read port
// one cycle after the address, over the full 2 * 256 * 4 word depth.
//
// The depth follows the thesis sizing (two maximum schedules for all nodes);
// the data are random.
module tb_mc_spm;
  import mc_pkg::*;
  localparam int DEPTH = 2 * MAX_SCHEDULE_SIZE * 4;
  logic clk = 1'b0, rst;
  ocp_cmd_e ocp_mcmd;
  logic [OCP_ADDR_W-1:0] ocp_maddr;
  logic [OCP_DATA_W-1:0] ocp_mdata;
  ocp_resp_e ocp_sresp;
  logic [OCP_DATA_W-1:0] ocp_sdata;
  logic [$clog2(DEPTH)-1:0] raddr;
  mc_word_t rdata;
  mc_word_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  mc_spm dut (.*);
  always #5 clk = ~clk;

  initial begin
    rst = 1'b0; ocp_mcmd = OCP_CMD_IDLE; ocp_maddr = '0; ocp_mdata = '0; raddr = '0;
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ocp_mcmd = OCP_CMD_WR; ocp_maddr = 32'(a * 4); ocp_mdata = $urandom;
      ref_mem[a] = ocp_mdata[SLOT_W-1:0];
      @(negedge clk);
      ocp_mcmd = OCP_CMD_IDLE;
      if (a % 97 == 0) begin
        checks++;
        if (ocp_sresp != OCP_RESP_DVA) begin failures++; $display("FAIL: no DVA"); end
      end
    end
    @(negedge clk);
    checks++;
    if (ocp_sresp != OCP_RESP_NULL) begin failures++; $display("FAIL: response while idle"); end
    for (int a = 0; a < DEPTH; a += 5) begin
      @(negedge clk) raddr = 11'(a);
      @(negedge clk);
      checks++;
      if (rdata != ref_mem[a]) begin failures++; $display("FAIL: word %0d", a); end
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
