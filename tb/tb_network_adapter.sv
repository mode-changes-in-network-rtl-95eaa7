`timescale 1ns / 1ps
// Test of the network adapter with its mode change extension.
// A behavioural SPM is attached to the SPM port. Slot table contents are
// written through the extractor-side write port into the write bank,
// followed by a swap command. The DMA table is programmed through OCPio.
// A cycle-level reference model of the send path predicts every packet:
// cycle, route, remote write address and data, including postponed slots,
// invalid slots and slots whose DMA entry is inactive (closed channel).
// Nothing may be sent before the first swap. Received packets are driven at
// random times (at most one per slot) and must all reach the SPM. Finally
// the DMA table is read back through OCPio and compared with the model.
//
// The slot-driven DMA behaviour follows the thesis description; the timing of
// the reference model follows this implementation's S1/S2/S3 choices.
module tb_network_adapter;
  import mc_pkg::*;
  localparam int AW = 16;
  localparam int MAXG = 8;
  logic clk = 1'b0, rst;
  ocp_cmd_e ocp_mcmd;
  logic [OCP_ADDR_W-1:0] ocp_maddr;
  logic [OCP_DATA_W-1:0] ocp_mdata;
  logic ocp_mrespaccept;
  ocp_resp_e ocp_sresp;
  logic [OCP_DATA_W-1:0] ocp_sdata;
  logic ocp_scmdaccept;
  logic [AW-1:0] spm_addr;
  logic spm_wen;
  logic [31:0] spm_wdata, spm_rdata;
  logic tx_valid;
  logic [ROUTE_W-1:0] tx_route;
  logic [AW-1:0] tx_waddr;
  logic [31:0] tx_data;
  logic rx_valid;
  logic [AW-1:0] rx_waddr;
  logic [31:0] rx_data;
  logic swap_req;
  slot_cnt_t swap_size;
  period_t swap_moment;
  logic st_wclk, st_wen;
  logic [SLOT_CNT_W:0] st_waddr;
  mc_word_t st_wdata;
  logic wbank, rbank, swapped;
  tdm_phase_e phase;
  slot_cnt_t slot_cnt;
  period_t period_cnt;
  int checks = 0, failures = 0;

  network_adapter #(.SPM_AW(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // behavioural SPM (synchronous read, write)
  logic [31:0] spm [2**12];
  always_ff @(posedge clk) begin
    spm_rdata <= spm[spm_addr[11:0]];
    if (spm_wen) spm[spm_addr[11:0]] <= spm_wdata;
  end

  // ---------------------------------------------------------- model
  slot_entry_t tbl [2][MAXG];
  typedef struct {bit active; int count; logic [15:0] wptr, rptr;} dma_t;
  dma_t dma [4];
  bit booted = 1'b0;
  longint cyc = 0;
  longint exp_cyc [$];
  logic [ROUTE_W-1:0] exp_route [$];
  logic [AW-1:0] exp_waddr [$];
  logic [31:0] exp_data [$];
  int sent = 0, postponed = 0, closed = 0, empty_slots = 0;
  // pending OCP write seen by the model at the same edge as the DUT
  bit io_busy = 1'b0;

  always @(posedge clk) if (!rst) begin
    int pend_idx;
    bit upd;
    upd = 1'b0; pend_idx = 0;
    cyc++;
    if (swapped) booted = 1'b1;
    // tx check
    if (tx_valid) begin
      check(exp_cyc.size() > 0, "unexpected packet");
      if (exp_cyc.size() > 0) begin
        check(exp_cyc[0] == cyc && exp_route[0] == tx_route && exp_waddr[0] == tx_waddr
              && exp_data[0] == tx_data,
              $sformatf("packet: cyc %0d/%0d route %h/%h waddr %h/%h data %h/%h",
                        cyc, exp_cyc[0], tx_route, exp_route[0], tx_waddr, exp_waddr[0],
                        tx_data, exp_data[0]));
        void'(exp_cyc.pop_front()); void'(exp_route.pop_front());
        void'(exp_waddr.pop_front()); void'(exp_data.pop_front());
        sent++;
      end
    end else if (exp_cyc.size() > 0) begin
      check(exp_cyc[0] != cyc, "missing packet");
      if (exp_cyc[0] == cyc) begin
        void'(exp_cyc.pop_front()); void'(exp_route.pop_front());
        void'(exp_waddr.pop_front()); void'(exp_data.pop_front());
      end
    end
    // S2 of a slot: decide what the DUT sends
    if (phase == TDM_S2 && booted) begin
      slot_entry_t e;
      e = tbl[rbank][slot_cnt];
      if (!e.valid) empty_slots++;
      else if (!dma[e.dma_idx].active) closed++;
      else begin
        exp_cyc.push_back(cyc + 2 + longint'(e.postpone));
        exp_route.push_back(e.route);
        exp_waddr.push_back(dma[e.dma_idx].wptr);
        exp_data.push_back(spm[dma[e.dma_idx].rptr[11:0]]);
        if (e.postpone != 0) postponed++;
        upd = 1'b1; pend_idx = e.dma_idx;
      end
    end
    if (upd) fork
      automatic int i = pend_idx;
      begin
        // the update happens at the end of S3, one edge later
        @(posedge clk);
        dma[i].rptr++; dma[i].wptr++; dma[i].count--;
        if (dma[i].count == 0) dma[i].active = 1'b0;
      end
    join_none
  end

  // ---------------------------------------------------------- drivers
  task automatic io_write(input int idx, input bit field, input logic [31:0] d);
    @(negedge clk);
    ocp_mcmd = OCP_CMD_WR; ocp_maddr = 32'((idx << 3) | (int'(field) << 2)); ocp_mdata = d;
    ocp_mrespaccept = 1'b1;
    @(posedge clk);
    // model the write after any S3 update of this edge (write wins)
    #1;
    if (field) begin dma[idx].count = int'(d[15:0]); dma[idx].active = (d[15:0] != 0); end
    else begin dma[idx].rptr = d[15:0]; dma[idx].wptr = d[31:16]; end
    @(negedge clk);
    check(ocp_scmdaccept && ocp_sresp == OCP_RESP_DVA, "DMA write accepted");
    ocp_mcmd = OCP_CMD_IDLE;
    @(negedge clk) ocp_mrespaccept = 1'b0;
  endtask

  task automatic io_read(input int idx, input bit field, output logic [31:0] d);
    @(negedge clk);
    ocp_mcmd = OCP_CMD_RD; ocp_maddr = 32'((idx << 3) | (int'(field) << 2));
    #1 d = ocp_sdata;
    check(ocp_scmdaccept && ocp_sresp == OCP_RESP_DVA, "DMA read answered");
    @(negedge clk) ocp_mcmd = OCP_CMD_IDLE;
  endtask

  task automatic st_write(input int addr, input mc_word_t d);
    st_waddr = addr[SLOT_CNT_W:0]; st_wdata = d; st_wen = 1'b1;
    #1.3 st_wclk = 1'b1;
    #1.3 st_wclk = 1'b0; st_wen = 1'b0;
  endtask

  task automatic load_schedule(input int g);
    int b;
    b = int'(wbank);
    for (int s = 0; s < g; s++) begin
      slot_entry_t e;
      e.valid    = ($urandom_range(0, 9) < 8);
      e.dma_idx  = 2'($urandom);
      e.postpone = 2'($urandom_range(0, 2));
      e.route    = 16'($urandom);
      tbl[b][s]  = e;
      st_write((b << SLOT_CNT_W) | s, mc_word_t'(e));
    end
    #2.1;
    swap_size = slot_cnt_t'(g - 1);
    swap_moment = {period_cnt[0], period_cnt[2:1]};
    swap_req = ~swap_req;
    @(posedge swapped);
    repeat (2) @(negedge clk);
    check(rbank == 1'(b), "new bank in use");
  endtask

  // receive traffic: at most one packet per slot, into addresses 0x800..
  int rx_n = 0;
  logic [31:0] rx_ref [int];
  bit rx_on = 1'b0;
  initial begin
    rx_valid = 1'b0; rx_waddr = '0; rx_data = '0;
    forever begin
      @(negedge clk);
      if (rx_on && $urandom_range(0, 1) == 1) begin
        rx_valid = 1'b1;
        rx_waddr = AW'(16'h800 + rx_n);
        rx_data = $urandom;
        rx_ref[16'h800 + rx_n] = rx_data;
        rx_n++;
        @(negedge clk) rx_valid = 1'b0;
        repeat (1 + $urandom_range(0, 3)) @(negedge clk);
      end
    end
  end

  initial begin
    logic [31:0] d;
    rst = 1'b0; ocp_mcmd = OCP_CMD_IDLE; ocp_maddr = '0; ocp_mdata = '0; ocp_mrespaccept = 1'b0;
    swap_req = 1'b0; swap_size = '0; swap_moment = '0;
    st_wclk = 1'b0; st_wen = 1'b0; st_waddr = '0; st_wdata = '0;
    for (int i = 0; i < 2**12; i++) spm[i] = $urandom;
    for (int i = 0; i < 4; i++) dma[i] = '{1'b0, 0, 16'h0, 16'h0};
    #1 rst = 1'b1;
    #20.5 rst = 1'b0;
    rx_on = 1'b1;
    // DMA entries active, but no schedule yet: nothing may be sent
    for (int i = 0; i < 4; i++) begin
      io_write(i, 1'b0, {16'(16'h400 + 64 * i), 16'(64 * i)});
      io_write(i, 1'b1, 32'(8 + i));
    end
    repeat (60) @(negedge clk);
    check(sent == 0 && exp_cyc.size() == 0, "no traffic before the first swap");
    for (int r = 0; r < 10; r++) begin
      load_schedule(2 + int'($urandom_range(0, MAXG - 2)));
      repeat (50 + $urandom_range(0, 60)) @(negedge clk);
      // refill one or two channels (idle or running)
      for (int i = 0; i < 4; i++)
        if ($urandom_range(0, 1) == 1 || !dma[i].active) begin
          if (!dma[i].active)
            io_write(i, 1'b0, {16'(16'h400 + 64 * i + 32 * (r % 2)), 16'(64 * i + 16 * (r % 3))});
          io_write(i, 1'b1, 32'($urandom_range(0, 12)));
        end
    end
    rx_on = 1'b0;
    repeat (100) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      io_read(i, 1'b1, d);
      check(d[31] == dma[i].active && int'(d[15:0]) == dma[i].count, $sformatf("DMA %0d status", i));
      io_read(i, 1'b0, d);
      check(d[15:0] == dma[i].rptr && d[31:16] == dma[i].wptr, $sformatf("DMA %0d pointers", i));
    end
    foreach (rx_ref[a]) check(spm[a] == rx_ref[a], $sformatf("received word at %h", a));
    check(exp_cyc.size() == 0, "all packets sent");
    check(sent > 50 && postponed > 10 && closed > 5 && empty_slots > 5,
          $sformatf("coverage sent=%0d postponed=%0d closed=%0d empty=%0d rx=%0d",
                    sent, postponed, closed, empty_slots, rx_n));
    $display("sent=%0d postponed=%0d closed=%0d empty=%0d rx=%0d", sent, postponed, closed, empty_slots, rx_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
