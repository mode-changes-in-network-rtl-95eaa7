`timescale 1ns / 1ps
// End-to-end test of the mode change platform at its default size (4 nodes,
// 256-slot maximum schedule, 10-slot boot schedule).
//
// The adapters run on skewed copies of the controller clock (0 to 2.2
// cycles). A behavioural network delivers each packet to the node named in
// the low bits of its route, and behavioural SPMs stand for the node memories.
// The test loads schedule A (5 slots) over the boot schedule, moves blocks on
// four channels, switches to schedule B (3 slots) in which one of those
// channels is closed, checks that the closed channel stalls while the open
// ones deliver, then switches back to A and checks that the stalled block
// completes. It checks the received data word by word, the swap moment of
// every adapter against the controller, the busy status, and the latency of
// the first mode change against fetch = 2 + N*(G+1) cycles and
// apply <= 3*(P+1)*G_old - 1 cycles. Mechanisms counted: mode changes,
// bank swaps, schedule size changes, postponed slots, closed-channel stalls,
// status polls while busy.
//
// The latency formulas come from the thesis; the schedules, the clock skews
// and the one-word packet network are this test's own.
module tb_mc_platform;
  import mc_pkg::*;

  localparam int NODES  = 4;
  localparam int SPM_AW = 16;
  localparam int CLK_NS = 10;
  localparam int MEMW   = 4096;
  localparam int SKEW [NODES] = '{0, 4, 13, 22};

  logic clk = 1'b0;
  logic [NODES-1:0] na_clk = '0;
  logic [NODES-1:0] na_rst;
  logic rst;

  always #(CLK_NS / 2) clk = ~clk;
  for (genvar i = 0; i < NODES; i++) begin : g_clk
    // transport delays: the adapter clock and reset arrive SKEW[i] ns late
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
  int n_mode_changes = 0, n_bank_swaps = 0, n_size_changes = 0;
  int n_postponed = 0, n_closed_stall = 0, n_busy_polls = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------ node SPM models
  logic [31:0] mem [NODES][MEMW];
  for (genvar i = 0; i < NODES; i++) begin : g_spm
    always_ff @(posedge na_clk[i]) begin
      if (spm_wen[i]) mem[i][spm_addr[i][11:0]] <= spm_wdata[i];
      spm_rdata[i] <= mem[i][spm_addr[i][11:0]];
    end
  end

  // ------------------------------------------------ network model
  typedef struct packed {
    logic [SPM_AW-1:0] addr;
    logic [31:0]       data;
  } pkt_t;
  pkt_t inbox [NODES][$];
  int   sent [NODES][NODES];
  int   tx_time [NODES];

  for (genvar i = 0; i < NODES; i++) begin : g_net
    always @(posedge na_clk[i]) begin
      if (tx_valid[i]) begin
        inbox[tx_route[i][1:0]].push_back('{tx_waddr[i], tx_data[i]});
        sent[i][tx_route[i][1:0]]++;
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

  // postponed slots seen on the wire: packet later than S3 + 1 cycle
  // (counted by observing the adapters' phase when tx_valid rises)
  for (genvar i = 0; i < NODES; i++) begin : g_post
    always @(posedge na_clk[i]) begin
      if (tx_valid[i] && dut.g_node[i].u_na.phase != TDM_S1) n_postponed++;
    end
  end

  // ------------------------------------------------ swap timing
  realtime mc_swap_t;
  realtime na_swap_t [NODES];
  always @(negedge mc_busy) if (!rst) mc_swap_t = $realtime;
  for (genvar i = 0; i < NODES; i++) begin : g_swp
    always @(posedge na_clk[i]) if (na_swapped[i]) begin
      na_swap_t[i] = $realtime;
      n_bank_swaps++;
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
    check(sys_spm_sresp == OCP_RESP_DVA, "SPM write answered with DVA");
  endtask

  task automatic io_write(input logic [31:0] data);
    @(posedge clk); #1;
    sys_io_mcmd        = OCP_CMD_WR;
    sys_io_maddr       = '0;
    sys_io_mdata       = data;
    sys_io_mrespaccept = 1'b1;
    do @(posedge clk); while (!sys_io_scmdaccept);
    check(sys_io_sresp == OCP_RESP_DVA, "controller write answered with DVA");
    #1 sys_io_mcmd = OCP_CMD_IDLE;
    sys_io_mrespaccept = 1'b0;
  endtask

  task automatic io_read(output logic [31:0] data);
    @(posedge clk); #1;
    sys_io_mcmd  = OCP_CMD_RD;
    sys_io_maddr = '0;
    #1;
    check(sys_io_scmdaccept && sys_io_sresp == OCP_RESP_DVA, "status read accepted");
    data = sys_io_sdata;
    @(posedge clk); #1;
    sys_io_mcmd = OCP_CMD_IDLE;
  endtask

  // ------------------------------------------------ node processors
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

  task automatic na_read(input int n, input int addr, output logic [31:0] data);
    @(posedge na_clk[n]); #1;
    na_io_mcmd[n]  = OCP_CMD_RD;
    na_io_maddr[n] = OCP_ADDR_W'(addr);
    #1 data = na_io_sdata[n];
    @(posedge na_clk[n]); #1;
    na_io_mcmd[n] = OCP_CMD_IDLE;
  endtask

  task automatic dma_setup(input int n, input int dst, input int rptr, input int wptr, input int cnt);
    na_write(n, dst * 8, {16'(wptr), 16'(rptr)});
    na_write(n, dst * 8 + 4, 32'(cnt));
  endtask

  // ------------------------------------------------ schedules
  // slot word: {valid, dma index = destination, postpone, route = destination}
  function automatic logic [31:0] slot(input int dst, input int post);
    slot_entry_t e;
    e.valid    = 1'b1;
    e.dma_idx  = DMA_IND_W'(dst);
    e.postpone = POSTPONE_W'(post);
    e.route    = ROUTE_W'(dst);
    return 32'(e);
  endfunction

  // Schedule A, 5 slots: 1->2 (s0), 2->3 (s1), 3->1 (s2), 1->3 (s3, +1 cycle)
  // Schedule B, 3 slots: 2->1 (s0), 3->2 (s1, +2 cycles); 1->2 closed
  task automatic load_schedule(input bit b, input int loc);
    int g;
    logic [31:0] w [NODES][5];
    for (int n = 0; n < NODES; n++) for (int s = 0; s < 5; s++) w[n][s] = '0;
    if (!b) begin
      g = 5;
      w[1][0] = slot(2, 0);
      w[2][1] = slot(3, 0);
      w[3][2] = slot(1, 0);
      w[1][3] = slot(3, 1);
    end else begin
      g = 3;
      w[2][0] = slot(1, 0);
      w[3][1] = slot(2, 2);
    end
    for (int n = 0; n < NODES; n++)
      for (int s = 0; s < g; s++) spm_write(loc + n * g + s, w[n][s]);
  endtask

  task automatic mode_change(input int g, input int loc, output int latency);
    logic [31:0] st;
    int t0;
    slot_cnt_t old_max;
    old_max = dut.u_mc.u_controller.u_tdm.max_slot;
    io_read(st);
    check(st[0] == 1'b0, "controller free before a mode change");
    io_write((32'(loc) << 16) | 32'(g - 1));
    t0 = 0;
    st = 32'd1;
    while (st[0]) begin
      io_read(st);
      t0 += 2;
      if (st[0]) n_busy_polls++;
    end
    latency = t0;
    n_mode_changes++;
    if (old_max != slot_cnt_t'(g - 1)) n_size_changes++;
    // every adapter swaps within the clock skew after the controller
    #(40);
    for (int i = 0; i < NODES; i++) begin
      check(na_swap_t[i] >= mc_swap_t && na_swap_t[i] - mc_swap_t <= 30.0,
            $sformatf("adapter %0d swaps with the controller", i));
      check(na_period_cnt[i] == mc_period_cnt || i > 0,
            "adapter and controller period counters agree");
    end
    begin
      slot_cnt_t mx [NODES];
      for (int i = 0; i < NODES; i++) mx[i] = '0;
      repeat (3 * 3 * g) begin
        @(posedge clk);
        for (int i = 0; i < NODES; i++) if (na_slot_cnt[i] > mx[i]) mx[i] = na_slot_cnt[i];
      end
      for (int i = 0; i < NODES; i++)
        check(mx[i] == slot_cnt_t'(g - 1), $sformatf("adapter %0d counts %0d slots", i, g));
    end
  endtask

  // ------------------------------------------------ main sequence
  int lat;
  logic [31:0] r;
  logic [31:0] src [NODES][256];
  realtime t_cmd;

  task automatic fill_src(input int n, input int base, input int cnt);
    for (int k = 0; k < cnt; k++) begin
      src[n][k + base - 32'h100] = $urandom;
      mem[n][base + k] = src[n][k + base - 32'h100];
    end
  endtask

  task automatic check_block(input int s, input int d, input int rbase, input int wbase, input int cnt);
    for (int k = 0; k < cnt; k++)
      check(mem[d][wbase + k] == src[s][rbase - 32'h100 + k],
            $sformatf("word %0d of block %0d->%0d", k, s, d));
  endtask

  initial begin
    rst = 1'b0;
    #1 rst = 1'b1;
    sys_spm_mcmd = OCP_CMD_IDLE; sys_spm_maddr = '0; sys_spm_mdata = '0;
    sys_io_mcmd = OCP_CMD_IDLE; sys_io_maddr = '0; sys_io_mdata = '0;
    sys_io_mrespaccept = 1'b0;
    na_io_mcmd = '{default: OCP_CMD_IDLE}; na_io_maddr = '0; na_io_mdata = '0;
    na_io_mrespaccept = '0;
    rx_valid = '0; rx_waddr = '0; rx_data = '0;
    for (int n = 0; n < NODES; n++) for (int k = 0; k < MEMW; k++) mem[n][k] = 32'hdead_0000 | 32'(k);
    for (int n = 0; n < NODES; n++) for (int m = 0; m < NODES; m++) sent[n][m] = 0;
    #(3 * CLK_NS + 2) rst = 1'b0;

    // boot schedule: no adapter sends anything before its first swap
    repeat (40) @(posedge clk);
    check(tx_valid == '0 && dut.g_node[1].u_na.booted == 1'b0, "silent before the first schedule");

    // ---- 1: boot (10 slots) -> A (5 slots); the case worked out in the text
    load_schedule(1'b0, 0);
    t_cmd = $realtime;
    mode_change(5, 0, lat);
    begin
      int cyc;
      cyc = int'((mc_swap_t - t_cmd) / CLK_NS);
      // fetch 2 + 4*(5+1) = 26 cycles, apply at most 3*3*10 - 1 = 89 cycles;
      // the write itself takes two cycles before the controller starts
      check(cyc <= 26 + 89 + 3, $sformatf("first mode change within bound (%0d cycles)", cyc));
      check(cyc >= 26 + 3 * 10, $sformatf("swap not before the second period boundary (%0d)", cyc));
      $display("first mode change: %0d cycles from command to swap", cyc);
    end
    for (int i = 0; i < NODES; i++) check(na_bank[i] == 1'b1, "read bank switched to 1");

    fill_src(1, 32'h100, 8);
    fill_src(1, 32'h140, 6);
    fill_src(2, 32'h100, 5);
    fill_src(3, 32'h100, 7);
    fork
      begin dma_setup(1, 2, 32'h100, 32'h200, 8); dma_setup(1, 3, 32'h140, 32'h300, 6); end
      dma_setup(2, 3, 32'h100, 32'h400, 5);
      dma_setup(3, 1, 32'h100, 32'h500, 7);
    join
    repeat (8 * 16 + 40) @(posedge clk);
    check_block(1, 2, 32'h100, 32'h200, 8);
    check_block(1, 3, 32'h140, 32'h300, 6);
    check_block(2, 3, 32'h100, 32'h400, 5);
    check_block(3, 1, 32'h100, 32'h500, 7);
    na_read(1, 2 * 8 + 4, r);
    check(r[31] == 1'b0 && r[15:0] == 16'd0, "DMA entry 1->2 finished");

    // ---- 2: A -> B (3 slots); 1->2 becomes closed
    load_schedule(1'b1, 1024);
    mode_change(3, 1024, lat);
    for (int i = 0; i < NODES; i++) check(na_bank[i] == 1'b0, "read bank switched back to 0");
    fill_src(1, 32'h180, 4);
    fill_src(2, 32'h120, 4);
    fill_src(3, 32'h120, 4);
    sent[1][2] = 0;
    fork
      dma_setup(1, 2, 32'h180, 32'h600, 4);
      dma_setup(2, 1, 32'h120, 32'h700, 4);
      dma_setup(3, 2, 32'h120, 32'h800, 4);
    join
    repeat (4 * 10 + 60) @(posedge clk);
    check_block(2, 1, 32'h120, 32'h700, 4);
    check_block(3, 2, 32'h120, 32'h800, 4);
    check(sent[1][2] == 0, "closed channel 1->2 sends nothing");
    na_read(1, 2 * 8 + 4, r);
    check(r[31] == 1'b1 && r[15:0] == 16'd4, "stalled DMA 1->2 keeps its block");
    if (sent[1][2] == 0 && r[31]) n_closed_stall++;

    // ---- 3: B -> A again; the stalled block completes
    mode_change(5, 0, lat);
    repeat (4 * 16 + 40) @(posedge clk);
    check_block(1, 2, 32'h180, 32'h600, 4);
    check(sent[1][2] == 4, "reopened channel 1->2 delivers the block");

    // ---- mechanisms
    check(n_mode_changes == 3, "three mode changes");
    check(n_bank_swaps == 3 * NODES, $sformatf("bank swaps: %0d", n_bank_swaps));
    check(n_size_changes >= 3, "schedule size changed");
    check(n_postponed > 0, "postponed slots used");
    check(n_closed_stall > 0, "closed channel stalled");
    check(n_busy_polls > 0, "busy status observed");
    $display("mechanisms: mode changes %0d, bank swaps %0d, size changes %0d, postponed packets %0d, closed-channel stalls %0d, busy polls %0d",
             n_mode_changes, n_bank_swaps, n_size_changes, n_postponed, n_closed_stall, n_busy_polls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200000 * CLK_NS);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
