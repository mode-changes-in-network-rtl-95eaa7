`timescale 1ns / 1ps
// Test of the mode change controller with 4 nodes and a behavioural SPM.
// Checks: OCPio status reads (free/busy, ERR for another address), that a
// write to another address starts nothing, the exact token stream pushed
// into the tree (per node: size - 1, then the node's G words from the SPM),
// one token per clock cycle, N*(G+1) tokens, the swap command (one toggle,
// moment = period counter two periods ahead), the return to free in the last
// cycle of the moment period, the new period length, and the latency bound
// fetch + apply <= 2 + N*(G+1) + 3*(P+1)*G_old - 1 cycles.
//
// The latency bound and the two-period swap distance are the thesis formulas;
// the schedules, locations and SPM contents are random or chosen here.
module tb_mc_controller;
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
  logic tree_req, tree_ack, swap_req, busy;
  logic [1:0] tree_id;
  mc_word_t tree_data;
  period_t swap_moment, period_cnt;
  tdm_phase_e phase;
  slot_cnt_t slot_cnt;
  int checks = 0, failures = 0;

  mc_controller #(.NODES(N), .MC_ADDR(32'h0000_0040)) dut (.*);
  always #5 clk = ~clk;
  assign tree_ack = tree_req;

  mc_word_t spm [2**AW];
  always_ff @(posedge clk) spm_rdata <= spm[spm_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // token capture
  logic [1:0] tok_id [$];
  mc_word_t tok_data [$];
  realtime tok_t [$];
  always @(tree_req) begin
    #2;
    tok_id.push_back(tree_id);
    tok_data.push_back(tree_data);
    tok_t.push_back($realtime);
  end
  int swaps = 0;
  period_t period_at_swap;
  always @(swap_req) begin swaps++; period_at_swap = period_cnt; end

  task automatic io_read(input logic [31:0] addr, output logic [31:0] d, output ocp_resp_e r);
    @(negedge clk);
    ocp_mcmd = OCP_CMD_RD; ocp_maddr = addr;
    #1 d = ocp_sdata; r = ocp_sresp;
    check(ocp_scmdaccept == 1'b1, "read accepted at once");
    @(negedge clk) ocp_mcmd = OCP_CMD_IDLE;
  endtask

  task automatic io_write(input logic [31:0] addr, input logic [31:0] d, output ocp_resp_e r);
    @(negedge clk);
    ocp_mcmd = OCP_CMD_WR; ocp_maddr = addr; ocp_mdata = d; ocp_mrespaccept = 1'b1;
    @(negedge clk);
    check(ocp_scmdaccept == 1'b1, "write accepted in WRITE_DONE");
    r = ocp_sresp;
    ocp_mcmd = OCP_CMD_IDLE;
    @(negedge clk) ocp_mrespaccept = 1'b0;
  endtask

  task automatic run(input int g, input int loc, input int g_old);
    logic [31:0] d; ocp_resp_e r;
    realtime t0, t1;
    int s0;
    tok_id.delete(); tok_data.delete(); tok_t.delete();
    s0 = swaps;
    for (int k = 0; k < N * g; k++) spm[loc + k] = mc_word_t'($urandom);
    io_write(32'h40, (32'(loc) << 16) | 32'(g - 1), r);
    t0 = $realtime;
    check(r == OCP_RESP_DVA, "write response DVA");
    io_read(32'h40, d, r);
    check(d[0] == 1'b1 && r == OCP_RESP_DVA, "busy after start");
    wait (busy == 1'b0);
    t1 = $realtime;
    #1;
    check(tok_id.size() == N * (g + 1), $sformatf("%0d tokens pushed", tok_id.size()));
    for (int n = 0; n < N; n++) begin
      int b = n * (g + 1);
      if (b + g < tok_id.size()) begin
        check(tok_id[b] == 2'(n) && tok_data[b] == mc_word_t'(g - 1), $sformatf("size word of node %0d", n));
        for (int s = 0; s < g; s++)
          check(tok_id[b + 1 + s] == 2'(n) && tok_data[b + 1 + s] == spm[loc + n * g + s],
                $sformatf("node %0d word %0d", n, s));
      end
    end
    for (int k = 1; k < tok_t.size(); k++)
      check(tok_t[k] - tok_t[k - 1] == 10.0, "one token per cycle");
    check(swaps == s0 + 1, "one swap command");
    check(swap_moment == {period_at_swap[0], period_at_swap[2:1]}, "moment two periods ahead");
    begin
      int cyc;
      cyc = int'((t1 - t0) / 10.0);
      check(cyc <= 2 + N * (g + 1) + 3 * 3 * g_old - 1, $sformatf("latency %0d cycles", cyc));
      check(cyc >= N * (g + 1) + 3 * g_old, $sformatf("swap after at least one full period (%0d)", cyc));
      $display("mode change to %0d slots from %0d: %0d cycles", g, g_old, cyc);
    end
    // new period length
    begin
      slot_cnt_t mx = '0;
      repeat (3 * g * 3) begin @(negedge clk); if (slot_cnt > mx) mx = slot_cnt; end
      check(mx == slot_cnt_t'(g - 1), "slot counter follows the new size");
    end
  endtask

  initial begin
    logic [31:0] d; ocp_resp_e r;
    rst = 1'b0; ocp_mcmd = OCP_CMD_IDLE; ocp_maddr = '0; ocp_mdata = '0; ocp_mrespaccept = 1'b0;
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    #5 tok_id.delete(); tok_data.delete(); tok_t.delete(); swaps = 0;
    io_read(32'h40, d, r);
    check(d[0] == 1'b0 && r == OCP_RESP_DVA, "free after reset");
    io_read(32'h44, d, r);
    check(r == OCP_RESP_ERR, "ERR for another address");
    io_write(32'h80, 32'h4, r);
    check(r == OCP_RESP_ERR, "write to another address answered ERR");
    repeat (3) @(negedge clk);
    check(busy == 1'b0 && tok_id.size() == 0, "write to another address starts nothing");
    run(5, 0, BOOT_SCHEDULE_SIZE);
    run(3, 1024, 5);
    run(7, 100, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
