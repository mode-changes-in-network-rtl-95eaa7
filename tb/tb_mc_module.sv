`timescale 1ns / 1ps
// Integration test of the mode change module: controller, asynchronous
// broadcast tree and one schedule extractor per node (4 nodes, default
// delays). The test writes random schedules into a behavioural mode change
// SPM, starts each mode change through OCPio and then checks per node:
// exactly G slot table writes, all into the bank given by that node's
// na_wbank input, at slot addresses 0..G-1, with the words the controller
// read for that node; one toggle of the node's swap request carrying size
// G-1 and the controller's swap moment. The write banks of the nodes differ
// on purpose, as they would after skewed start-up.
//
// What is checked follows the thesis design; schedule sizes, locations,
// contents and the write banks are random.
module tb_mc_module;
  import mc_pkg::*;
  localparam int N = 4;
  localparam int AW = $clog2(2 * MAX_SCHEDULE_SIZE * N);
  logic clk = 1'b0, rst;
  ocp_cmd_e ocp_mcmd;
  logic [OCP_ADDR_W-1:0] ocp_maddr;
  logic [OCP_DATA_W-1:0] ocp_mdata;
  logic ocp_mrespaccept;
  ocp_resp_e ocp_sresp;
  logic [OCP_DATA_W-1:0] ocp_sdata;
  logic ocp_scmdaccept;
  logic [AW-1:0] spm_addr;
  mc_word_t spm_rdata;
  logic      [N-1:0] na_swap_req;
  slot_cnt_t [N-1:0] na_swap_size;
  period_t   [N-1:0] na_swap_moment;
  logic      [N-1:0] na_wbank;
  logic      [N-1:0] st_wclk, st_wen;
  logic      [N-1:0][SLOT_CNT_W:0] st_waddr;
  mc_word_t  [N-1:0] st_wdata;
  logic busy;
  tdm_phase_e phase;
  slot_cnt_t slot_cnt;
  period_t period_cnt;
  int checks = 0, failures = 0;

  mc_module #(.NODES(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  mc_word_t spm [2**AW];
  always_ff @(posedge clk) spm_rdata <= spm[spm_addr];

  // per-node slot table models and swap observation
  mc_word_t tbl [N][2][MAX_SCHEDULE_SIZE];
  int writes [N];
  int bad_bank [N];
  int swaps [N];
  bit started = 1'b0;
  period_t period_prev, exp_moment;
  always @(negedge clk) period_prev = period_cnt;
  always @(na_swap_req[0]) exp_moment = {period_prev[0], period_prev[2:1]};
  for (genvar i = 0; i < N; i++) begin : g_obs
    always @(posedge st_wclk[i]) if (started && st_wen[i]) begin
      writes[i]++;
      if (st_waddr[i][SLOT_CNT_W] != na_wbank[i]) bad_bank[i]++;
      tbl[i][st_waddr[i][SLOT_CNT_W]][st_waddr[i][SLOT_CNT_W-1:0]] = st_wdata[i];
    end
    always @(na_swap_req[i]) if (started) swaps[i]++;
  end

  task automatic mode_change(input int g, input int loc);
    for (int k = 0; k < N * g; k++) spm[loc + k] = mc_word_t'($urandom);
    for (int i = 0; i < N; i++) begin
      writes[i] = 0; bad_bank[i] = 0; swaps[i] = 0;
      for (int s = 0; s < g; s++) tbl[i][na_wbank[i]][s] = '0;
    end
    @(negedge clk);
    ocp_mcmd = OCP_CMD_WR; ocp_maddr = '0; ocp_mdata = (32'(loc) << 16) | 32'(g - 1);
    ocp_mrespaccept = 1'b1;
    @(negedge clk) ocp_mcmd = OCP_CMD_IDLE;
    @(negedge clk) ocp_mrespaccept = 1'b0;
    wait (busy == 1'b0);
    #20;
    for (int i = 0; i < N; i++) begin
      check(writes[i] == g, $sformatf("node %0d: %0d writes, expected %0d", i, writes[i], g));
      check(bad_bank[i] == 0, $sformatf("node %0d writes only its write bank", i));
      for (int s = 0; s < g; s++)
        check(tbl[i][na_wbank[i]][s] == spm[loc + i * g + s], $sformatf("node %0d slot %0d", i, s));
      check(swaps[i] == 1, $sformatf("node %0d swap request toggled once", i));
      check(na_swap_size[i] == slot_cnt_t'(g - 1), $sformatf("node %0d size", i));
      check(na_swap_moment[i] == exp_moment, $sformatf("node %0d moment", i));
    end
  endtask

  initial begin
    rst = 1'b0; ocp_mcmd = OCP_CMD_IDLE; ocp_maddr = '0; ocp_mdata = '0; ocp_mrespaccept = 1'b0;
    na_wbank = 4'b0110;
    #1 rst = 1'b1;
    #20.5 rst = 1'b0;
    #10 started = 1'b1;
    for (int r = 0; r < 8; r++) begin
      int g;
      g = (r == 7) ? 40 : 1 + int'($urandom_range(0, 9));
      mode_change(g, (r % 2) * MAX_SCHEDULE_SIZE * N + int'($urandom_range(0, 200)));
      na_wbank = ~na_wbank ^ N'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #300000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
