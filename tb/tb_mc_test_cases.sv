`timescale 1ns / 1ps
// The two verification test cases of the thesis, run on the platform at its
// default size with its static set of 12 schedules.
//
// Schedules (sizes and open channels as in the thesis table): schedule 1 and
// 3 open all six channels among cores 1 to 3 in 5 slots, schedule 2 opens
// none in 4 slots, schedules 4 to 9 open one channel each and 10 to 12 one
// pair each, in 3 slots. Core 0 is the system processor and is not part of
// any schedule. All 12 are written once into the mode change SPM.
//
// Test case 1 (open channels): every core keeps setting up 4-word blocks to
// every other core whenever the DMA entry is free, while the schedules are
// applied in the order 4, 5, ..., 12, 1. After each mode change the test
// counts the packets per channel over 40 periods and checks that exactly the
// channels of the active schedule carry traffic.
// Test case 2 (correctness): each core starts one random 6-word block to
// every other core, the schedules 1, 4, 3, 2 and again 1 are applied with
// short random delays, and at the end every block must have arrived intact
// and every DMA entry must be finished.
//
// The schedule sizes, channel sets and sequences come from the thesis; the
// slot positions, routes, block sizes, delays and the one-word packet
// network model are this test's own, since the thesis does not list them.
module tb_mc_test_cases;
  import mc_pkg::*;

  localparam int NODES  = 4;
  localparam int SPM_AW = 16;
  localparam int CLK_NS = 10;
  localparam int SKEW [NODES] = '{0, 6, 14, 23};

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


  localparam int MEMW = 4096;

  // ------------------------------------------------ node SPM models
  logic [31:0] mem [NODES][MEMW];
  for (genvar i = 0; i < NODES; i++) begin : g_spm
    always_ff @(posedge na_clk[i]) begin
      if (spm_wen[i]) mem[i][spm_addr[i][11:0]] <= spm_wdata[i];
      spm_rdata[i] <= mem[i][spm_addr[i][11:0]];
    end
  end

  // ------------------------------------------------ network model
  // a packet goes to the node in route bits [1:0]; each receiver takes at
  // most one packet per slot
  typedef struct packed {
    logic [SPM_AW-1:0] addr;
    logic [31:0]       data;
  } pkt_t;
  pkt_t inbox [NODES][$];
  int   traffic [NODES][NODES];
  for (genvar i = 0; i < NODES; i++) begin : g_net
    always @(posedge na_clk[i]) begin
      if (tx_valid[i]) begin
        inbox[tx_route[i][1:0]].push_back('{tx_waddr[i], tx_data[i]});
        traffic[i][tx_route[i][1:0]]++;
      end
    end
    int gap = 0;
    always @(posedge na_clk[i]) begin
      rx_valid[i] <= 1'b0;
      if (gap > 0) gap <= gap - 1;
      if (gap == 0 && inbox[i].size() > 0) begin
        pkt_t p;
        p = inbox[i].pop_front();
        rx_valid[i] <= 1'b1;
        rx_waddr[i] <= p.addr;
        rx_data[i]  <= p.data;
        gap <= 2;
      end
    end
  end

  // ------------------------------------------------ system processor
  task automatic spm_write(input int addr, input logic [31:0] data);
    @(posedge clk); #1;
    sys_spm_mcmd  = OCP_CMD_WR;
    sys_spm_maddr = OCP_ADDR_W'(addr * 4);
    sys_spm_mdata = data;
    @(posedge clk); #1;
    sys_spm_mcmd  = OCP_CMD_IDLE;
  endtask

  task automatic io_write(input logic [31:0] data);
    @(posedge clk); #1;
    sys_io_mcmd        = OCP_CMD_WR;
    sys_io_maddr       = '0;
    sys_io_mdata       = data;
    sys_io_mrespaccept = 1'b1;
    do @(posedge clk); while (!sys_io_scmdaccept);
    #1 sys_io_mcmd = OCP_CMD_IDLE;
    sys_io_mrespaccept = 1'b0;
  endtask

  // ------------------------------------------------ node processors
  // one OCPio port per node, shared by the processes of that node
  semaphore port [NODES];
  initial for (int n = 0; n < NODES; n++) port[n] = new(1);

  task automatic na_write(input int n, input int addr, input logic [31:0] data);
    port[n].get(1);
    @(posedge na_clk[n]); #1;
    na_io_mcmd[n]        = OCP_CMD_WR;
    na_io_maddr[n]       = OCP_ADDR_W'(addr);
    na_io_mdata[n]       = data;
    na_io_mrespaccept[n] = 1'b1;
    do @(posedge na_clk[n]); while (!na_io_scmdaccept[n]);
    #1 na_io_mcmd[n] = OCP_CMD_IDLE;
    na_io_mrespaccept[n] = 1'b0;
    port[n].put(1);
  endtask

  task automatic na_read(input int n, input int addr, output logic [31:0] data);
    port[n].get(1);
    @(posedge na_clk[n]); #1;
    na_io_mcmd[n]  = OCP_CMD_RD;
    na_io_maddr[n] = OCP_ADDR_W'(addr);
    #1 data = na_io_sdata[n];
    @(posedge na_clk[n]); #1;
    na_io_mcmd[n] = OCP_CMD_IDLE;
    port[n].put(1);
  endtask

  // ------------------------------------------------ the 12 schedules
  // open[s][src][dst]: the channels of schedule s (1..12); node 0 is the
  // system processor and takes no part
  int  sched_size [13] = '{0, 5, 4, 5, 3, 3, 3, 3, 3, 3, 3, 3, 3};
  bit  open [13][NODES][NODES];

  task automatic set_open(input int s, input int a, input int b);
    open[s][a][b] = 1'b1;
  endtask

  function automatic int loc_of(input int s);
    return s * 32;
  endfunction

  // the j-th channel of a sender gets slot j (schedule 3: slot j + 2 with a
  // postponed start and other route bits, so it differs from schedule 1)
  task automatic write_schedule(input int s);
    slot_entry_t e;
    int g, j;
    g = sched_size[s];
    for (int n = 0; n < NODES; n++) begin
      logic [31:0] w [5];
      for (int k = 0; k < 5; k++) w[k] = '0;
      j = 0;
      for (int d = 1; d < NODES; d++)
        if (open[s][n][d]) begin
          e.valid    = 1'b1;
          e.dma_idx  = DMA_IND_W'(d);
          e.postpone = POSTPONE_W'(s == 3);
          e.route    = {8'(s), 6'(0), 2'(d)};
          w[(s == 3) ? j + 2 : j] = 32'(e);
          j++;
        end
      for (int k = 0; k < g; k++) spm_write(loc_of(s) + n * g + k, w[k]);
    end
  endtask

  task automatic mode_change(input int s);
    io_write((32'(loc_of(s)) << 16) | 32'(sched_size[s] - 1));
    wait (mc_busy == 1'b0);
    check(dut.u_mc.u_controller.u_tdm.max_slot == slot_cnt_t'(sched_size[s] - 1),
          $sformatf("schedule %0d: period of %0d slots", s, sched_size[s]));
  endtask

  // ------------------------------------------------ test case 1 processes
  // every core keeps trying to send a 4-word block to every other core
  bit tc1_run;
  for (genvar i = 1; i < NODES; i++) begin : g_tc1
    initial begin
      logic [31:0] st;
      wait (tc1_run);
      while (tc1_run) begin
        for (int d = 1; d < NODES; d++) begin
          if (d == i) continue;
          na_read(i, d * 8 + 4, st);
          if (!st[31]) begin
            na_write(i, d * 8, {16'h0f00, 16'h0100});
            na_write(i, d * 8 + 4, 32'd4);
          end
        end
      end
    end
  end

  // ------------------------------------------------ test case 2 blocks
  localparam int BLK = 6;
  logic [31:0] blk [NODES][NODES][BLK];

  task automatic start_blocks();
    for (int n = 1; n < NODES; n++)
      for (int d = 1; d < NODES; d++) begin
        if (d == n) continue;
        for (int k = 0; k < BLK; k++) begin
          blk[n][d][k] = $urandom;
          mem[n][32'h200 + d * 16 + k] = blk[n][d][k];
          mem[d][32'h800 + n * 16 + k] = 32'hdead_beef;
        end
        na_write(n, d * 8, {16'(32'h800 + n * 16), 16'(32'h200 + d * 16)});
        na_write(n, d * 8 + 4, 32'(BLK));
      end
  endtask

  initial begin
    int tc1_seq [10] = '{4, 5, 6, 7, 8, 9, 10, 11, 12, 1};
    int tc2_seq [5]  = '{1, 4, 3, 2, 1};
    rst = 1'b0;
    #1 rst = 1'b1;
    tc1_run = 1'b0;
    sys_spm_mcmd = OCP_CMD_IDLE; sys_spm_maddr = '0; sys_spm_mdata = '0;
    sys_io_mcmd = OCP_CMD_IDLE; sys_io_maddr = '0; sys_io_mdata = '0;
    sys_io_mrespaccept = 1'b0;
    na_io_mcmd = '{default: OCP_CMD_IDLE}; na_io_maddr = '0; na_io_mdata = '0;
    na_io_mrespaccept = '0;
    rx_valid = '0; rx_waddr = '0; rx_data = '0;
    for (int n = 0; n < NODES; n++) for (int k = 0; k < MEMW; k++) mem[n][k] = 32'(k);
    for (int s = 0; s < 13; s++)
      for (int a = 0; a < NODES; a++) for (int b = 0; b < NODES; b++) open[s][a][b] = 1'b0;
    for (int s = 1; s <= 3; s += 2) begin
      set_open(s, 1, 2); set_open(s, 2, 3); set_open(s, 3, 1);
      set_open(s, 1, 3); set_open(s, 2, 1); set_open(s, 3, 2);
    end
    set_open(4, 1, 2);  set_open(5, 2, 3);  set_open(6, 3, 1);
    set_open(7, 1, 3);  set_open(8, 2, 1);  set_open(9, 3, 2);
    set_open(10, 1, 2); set_open(10, 2, 1);
    set_open(11, 2, 3); set_open(11, 3, 2);
    set_open(12, 3, 1); set_open(12, 1, 3);
    #(3 * CLK_NS + 2) rst = 1'b0;
    repeat (10) @(posedge clk);
    for (int s = 1; s <= 12; s++) write_schedule(s);

    // ---- test case 1: open channels follow the active schedule
    tc1_run = 1'b1;
    foreach (tc1_seq[k]) begin
      int s;
      s = tc1_seq[k];
      mode_change(s);
      // let the last packets of the old schedule arrive, then count
      repeat (3 * 5 * 2) @(posedge clk);
      for (int a = 0; a < NODES; a++) for (int b = 0; b < NODES; b++) traffic[a][b] = 0;
      repeat (3 * sched_size[s] * 40) @(posedge clk);
      for (int a = 0; a < NODES; a++)
        for (int b = 0; b < NODES; b++)
          check((traffic[a][b] > 0) == open[s][a][b],
                $sformatf("schedule %0d: channel %0d->%0d %s (%0d packets)", s, a, b,
                          open[s][a][b] ? "open" : "closed", traffic[a][b]));
      $display("schedule %2d: %0d slots, channels with traffic: %s%s%s%s%s%s", s, sched_size[s],
               traffic[1][2] ? "1to2 " : "", traffic[2][3] ? "2to3 " : "", traffic[3][1] ? "3to1 " : "",
               traffic[1][3] ? "1to3 " : "", traffic[2][1] ? "2to1 " : "", traffic[3][2] ? "3to2 " : "");
    end
    tc1_run = 1'b0;
    repeat (400) @(posedge clk);

    // ---- test case 2: blocks arrive intact across mode changes
    start_blocks();
    foreach (tc2_seq[k]) begin
      mode_change(tc2_seq[k]);
      repeat (3 * sched_size[tc2_seq[k]] * 2 + $urandom_range(10)) @(posedge clk);
    end
    repeat (3 * 5 * (BLK + 2)) @(posedge clk);
    for (int n = 1; n < NODES; n++)
      for (int d = 1; d < NODES; d++) begin
        logic [31:0] st;
        if (d == n) continue;
        for (int k = 0; k < BLK; k++)
          check(mem[d][32'h800 + n * 16 + k] == blk[n][d][k],
                $sformatf("test case 2: word %0d of block %0d->%0d", k, n, d));
        na_read(n, d * 8 + 4, st);
        check(st[31] == 1'b0, $sformatf("test case 2: DMA %0d->%0d finished", n, d));
      end

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
