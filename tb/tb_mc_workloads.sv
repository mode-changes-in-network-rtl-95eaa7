`timescale 1ns / 1ps
// Latency workloads of the thesis evaluation, run on the platform at its
// default size (4 nodes, 256-slot maximum schedule, 10-slot boot schedule).
//
// Three cases share this testbench because they differ only in schedule
// sizes: the worked example (boot schedule of 10 slots to a schedule of 5
// slots), the worst case with a 10-slot maximum schedule, and the worst case
// with 256-slot schedules. For each mode change the test writes the schedule
// into the mode change SPM through OCPcore, starts the controller through
// OCPio, and measures the cycles from the accepted command to the swap (the
// controller's busy flag falling). That time must not exceed
// fetch + apply = 2 + N*(G+1) + 3*(P+1)*G_old - 1 cycles (N nodes, G new
// slots, G_old old slots, P = 2 periods between swap decision and swap).
// The start of each mode change is moved by a random number of cycles within
// an old period, so the run sweeps over the apply wait; the largest time
// seen is reported next to the bound.
//
// A last part starts each command in the cycle after the previous swap, with
// the most skewed adapter 2.9 cycles behind the controller, and then checks
// both slot table banks, as the thesis requires a minimum separation of three
// cycles between a swap and the next schedule push.
//
// After each swap the test checks the whole new schedule in every adapter:
// each slot entry carries its own slot number in route bits [15:8] and a
// random low byte and postpone value, all four DMA entries of every adapter
// stay active, so every slot sends one packet. For one full new period per
// node the packets must show each slot once, in slot order, with the
// route the schedule gave it.
//
// The workload sizes and the latency formula come from the thesis; the
// schedule contents, the start offsets and the clock skews are this test's
// own. The software part of the thesis totals (writing the SPM, polling) is
// not counted in the measured time.
module tb_mc_workloads;
  import mc_pkg::*;

  localparam int NODES  = 4;
  localparam int SPM_AW = 16;
  localparam int CLK_NS = 10;
  localparam int SKEW [NODES] = '{29, 19, 9, 0};

  logic clk = 1'b0;
  logic [NODES-1:0] na_clk = '0;
  logic [NODES-1:0] na_rst;
  logic rst;

  always #(CLK_NS / 2) clk = ~clk;
  for (genvar i = 0; i < NODES; i++) begin : g_clk
    always @(clk) na_clk[i] <= #(SKEW[i]) clk;
    always @(rst) na_rst[i] <= #(SKEW[i]) rst;
  end

  ocp_cmd_e                  sys_spm_mcmd;
  logic [OCP_ADDR_W-1:0]     sys_spm_maddr;
  logic [OCP_DATA_W-1:0]     sys_spm_mdata;
  ocp_resp_e                 sys_spm_sresp;
  logic [OCP_DATA_W-1:0]     sys_spm_sdata;
  ocp_cmd_e                  sys_io_mcmd;
  logic [OCP_ADDR_W-1:0]     sys_io_maddr;
  logic [OCP_DATA_W-1:0]     sys_io_mdata;
  logic                      sys_io_mrespaccept;
  ocp_resp_e                 sys_io_sresp;
  logic [OCP_DATA_W-1:0]     sys_io_sdata;
  logic                      sys_io_scmdaccept;
  ocp_cmd_e  [NODES-1:0]     na_io_mcmd;
  logic      [NODES-1:0][OCP_ADDR_W-1:0] na_io_maddr;
  logic      [NODES-1:0][OCP_DATA_W-1:0] na_io_mdata;
  logic      [NODES-1:0]     na_io_mrespaccept;
  ocp_resp_e [NODES-1:0]     na_io_sresp;
  logic      [NODES-1:0][OCP_DATA_W-1:0] na_io_sdata;
  logic      [NODES-1:0]     na_io_scmdaccept;
  logic      [NODES-1:0][SPM_AW-1:0] spm_addr;
  logic      [NODES-1:0]     spm_wen;
  logic      [NODES-1:0][31:0] spm_wdata;
  logic      [NODES-1:0][31:0] spm_rdata;
  logic      [NODES-1:0]     tx_valid;
  logic      [NODES-1:0][ROUTE_W-1:0] tx_route;
  logic      [NODES-1:0][SPM_AW-1:0] tx_waddr;
  logic      [NODES-1:0][31:0] tx_data;
  logic      [NODES-1:0]     rx_valid;
  logic      [NODES-1:0][SPM_AW-1:0] rx_waddr;
  logic      [NODES-1:0][31:0] rx_data;
  logic                      mc_busy;
  slot_cnt_t                 mc_slot_cnt;
  period_t                   mc_period_cnt;
  slot_cnt_t [NODES-1:0]     na_slot_cnt;
  period_t   [NODES-1:0]     na_period_cnt;
  logic      [NODES-1:0]     na_bank;
  logic      [NODES-1:0]     na_swapped;

  mc_platform dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // node SPMs are not examined here: the adapters read zeros, nothing arrives
  assign spm_rdata = '0;
  assign rx_valid  = '0;
  assign rx_waddr  = '0;
  assign rx_data   = '0;

  // ------------------------------------------------ packet capture
  bit                 capture;
  logic [ROUTE_W-1:0] seen [NODES][$];
  for (genvar i = 0; i < NODES; i++) begin : g_cap
    always @(posedge na_clk[i]) if (capture && tx_valid[i]) seen[i].push_back(tx_route[i]);
  end

  // ------------------------------------------------ system processor
  task automatic spm_write(input int addr, input logic [31:0] data);
    @(posedge clk); #1;
    sys_spm_mcmd  = OCP_CMD_WR;
    sys_spm_maddr = OCP_ADDR_W'(addr * 4);
    sys_spm_mdata = data;
    @(posedge clk); #1;
    sys_spm_mcmd  = OCP_CMD_IDLE;
    check(sys_spm_sresp == OCP_RESP_DVA, "SPM write answered with DVA");
  endtask

  // returns the time of the clock edge at which the controller took the write
  task automatic io_write(input logic [31:0] data, output realtime t_acc);
    @(posedge clk); #1;
    sys_io_mcmd        = OCP_CMD_WR;
    sys_io_maddr       = '0;
    sys_io_mdata       = data;
    sys_io_mrespaccept = 1'b1;
    do @(posedge clk); while (!sys_io_scmdaccept);
    t_acc = $realtime;
    check(sys_io_sresp == OCP_RESP_DVA, "controller write answered with DVA");
    #1 sys_io_mcmd = OCP_CMD_IDLE;
    sys_io_mrespaccept = 1'b0;
  endtask

  task automatic na_write(input int n, input int addr, input logic [31:0] data);
    @(posedge na_clk[n]); #1;
    na_io_mcmd[n]        = OCP_CMD_WR;
    na_io_maddr[n]       = OCP_ADDR_W'(addr);
    na_io_mdata[n]       = data;
    na_io_mrespaccept[n] = 1'b1;
    do @(posedge na_clk[n]); while (!na_io_scmdaccept[n]);
    #1 na_io_mcmd[n] = OCP_CMD_IDLE;
    na_io_mrespaccept[n] = 1'b0;
  endtask

  // ------------------------------------------------ schedules
  // expected routes of the schedule stored at location 0 and at location 1024
  logic [ROUTE_W-1:0] exp_sched [2][NODES][MAX_SCHEDULE_SIZE];

  task automatic load_schedule(input int g, input int loc);
    slot_entry_t e;
    for (int n = 0; n < NODES; n++)
      for (int s = 0; s < g; s++) begin
        e.valid    = 1'b1;
        e.dma_idx  = DMA_IND_W'(s);
        e.postpone = POSTPONE_W'($urandom_range(2));
        e.route    = {8'(s), 8'($urandom)};
        exp_sched[loc != 0][n][s] = e.route;
        spm_write(loc + n * g + s, 32'(e));
      end
  endtask

  // one mode change; returns the measured cycles from command to swap
  task automatic mode_change(input int g, input int loc, input int g_old, output int cyc);
    realtime t_acc;
    logic [NODES-1:0] bank0;
    int bound;
    bank0 = na_bank;
    io_write((32'(loc) << 16) | 32'(g - 1), t_acc);
    check(mc_busy == 1'b1, "controller busy after the command");
    wait (mc_busy == 1'b0);
    cyc   = int'(($realtime - t_acc) / CLK_NS);
    bound = 2 + NODES * (g + 1) + 3 * 3 * g_old - 1;
    check(cyc <= bound, $sformatf("%0d -> %0d slots: %0d cycles, bound %0d", g_old, g, cyc, bound));
    check(cyc >= NODES * (g + 1), $sformatf("swap not before the fetch ends (%0d)", cyc));
    // every adapter swaps within the clock skew; the last old-schedule packet
    // (postponed up to two cycles) has left before the capture starts
    repeat (8) @(posedge clk);
    check(na_bank == ~bank0, "every adapter switched its read bank");
    check(dut.u_mc.u_controller.u_tdm.max_slot == slot_cnt_t'(g - 1), "controller period follows");
  endtask

  // one new period seen on every adapter: each slot once, in order, right route
  task automatic check_period(input int g, input bit which);
    for (int n = 0; n < NODES; n++) seen[n].delete();
    capture = 1'b1;
    repeat (3 * g + 6) @(posedge clk);
    capture = 1'b0;
    for (int n = 0; n < NODES; n++) begin
      int ok = 1;
      bit got [MAX_SCHEDULE_SIZE];
      int miss = 0;
      for (int s = 0; s < g; s++) got[s] = 1'b0;
      for (int k = 0; k < seen[n].size(); k++) begin
        int s;
        s = int'(seen[n][k][15:8]);
        if (s >= g || seen[n][k] != exp_sched[which][n][s]) ok = 0;
        else got[s] = 1'b1;
        if (k > 0 && s != (int'(seen[n][k - 1][15:8]) + 1) % g) ok = 0;
      end
      for (int s = 0; s < g; s++) if (!got[s]) miss++;
      check(ok == 1, $sformatf("node %0d: packets follow the %0d-slot schedule", n, g));
      check(miss == 0, $sformatf("node %0d: %0d of %0d slots not seen", n, miss, g));
    end
  endtask

  // a workload: first change from the current schedule, then `reps` changes
  // between two same-size schedules, each started at a random offset
  task automatic workload(input string name, input int g, input int g_cur, input int reps);
    int cyc, worst, worst_bound, loc, g_old;
    worst = 0;
    worst_bound = 0;
    loc   = 0;
    g_old = g_cur;
    for (int r = 0; r <= reps; r++) begin
      load_schedule(g, loc);
      repeat ($urandom_range(3 * 3 * g_old)) @(posedge clk);
      mode_change(g, loc, g_old, cyc);
      if (cyc > worst) begin
        worst       = cyc;
        worst_bound = 2 + NODES * (g + 1) + 9 * g_old - 1;
      end
      check_period(g, loc != 0);
      if (r == 0) $display("%s: first change %0d -> %0d slots took %0d cycles", name, g_old, g, cyc);
      g_old = g;
      loc   = (loc == 0) ? 1024 : 0;
    end
    $display("%s: longest of %0d mode changes %0d cycles (its bound %0d)",
             name, reps + 1, worst, worst_bound);
  endtask

  // Back-to-back mode changes: each command is written in the cycle after the
  // previous swap, while the most skewed adapter (node 0, 2.9 cycles late)
  // may not have swapped yet. Two different schedules alternate; at the end
  // both slot table banks of every adapter are checked on the wire, so a token
  // written into the wrong bank would show.
  task automatic back_to_back(input int g, input int reps);
    realtime t_acc;
    int loc, cyc;
    load_schedule(g, 0);
    load_schedule(g, 1024);
    loc = 0;
    for (int r = 0; r < reps; r++) begin
      io_write((32'(loc) << 16) | 32'(g - 1), t_acc);
      wait (mc_busy == 1'b0);
      loc = (loc == 0) ? 1024 : 0;
    end
    repeat (8) @(posedge clk);
    loc = (loc == 0) ? 1024 : 0;
    check_period(g, loc != 0);
    loc = (loc == 0) ? 1024 : 0;
    mode_change(g, loc, g, cyc);
    check_period(g, loc != 0);
    $display("back-to-back: %0d mode changes between two %0d-slot schedules, both banks checked", reps, g);
  endtask

  initial begin
    rst = 1'b0;
    #1 rst = 1'b1;
    capture = 1'b0;
    sys_spm_mcmd = OCP_CMD_IDLE; sys_spm_maddr = '0; sys_spm_mdata = '0;
    sys_io_mcmd = OCP_CMD_IDLE; sys_io_maddr = '0; sys_io_mdata = '0;
    sys_io_mrespaccept = 1'b0;
    na_io_mcmd = '{default: OCP_CMD_IDLE}; na_io_maddr = '0; na_io_mdata = '0;
    na_io_mrespaccept = '0;
    #(3 * CLK_NS + 2) rst = 1'b0;
    repeat (10) @(posedge clk);

    // all DMA entries active with more words than the run will send
    for (int n = 0; n < NODES; n++)
      for (int d = 0; d < NODES; d++) begin
        na_write(n, d * 8, {16'h0000, 16'h0000});
        na_write(n, d * 8 + 4, 32'hffff);
      end

    // worked example: boot (10 slots) -> 5 slots
    workload("worked example", 5, BOOT_SCHEDULE_SIZE, 0);
    // worst case, 10-slot schedules
    workload("10-slot schedules", 10, 5, 20);
    // worst case, 256-slot schedules
    workload("256-slot schedules", MAX_SCHEDULE_SIZE, 10, 6);
    // minimum separation between a swap and the next command
    back_to_back(10, 12);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400000 * CLK_NS);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
