`timescale 1ns / 1ps
// Test of the NA side of a mode change.
// The swap command is toggled at random times that are not aligned with the
// clock. For every cycle the testbench predicts whether the swap must happen:
// it must fall in the first cycle that is the last cycle of a period
// (phase s3 of the last slot) while the period counter equals the commanded
// moment, counted from the third clock edge after the request toggle (two
// synchronizer stages plus the edge detector). The checks cover the swap
// cycle, the bank toggle, wbank = ~rbank, the booted flag, and the new
// period length (size + 1 slots of 3 cycles).
//
// The swap rule (last cycle of the moment period, two synchronizer flip-flops)
// is the thesis rule; the sizes, moments and request times are random.
module tb_na_mode_change;
  import mc_pkg::*;
  logic clk = 1'b0, rst;
  logic swap_req;
  slot_cnt_t swap_size;
  period_t swap_moment;
  tdm_phase_e phase;
  slot_cnt_t slot_cnt;
  period_t period_cnt;
  logic eop, rbank, wbank, booted, swapped;
  int checks = 0, failures = 0;

  na_mode_change dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // prediction state
  int edges_since_req = -1;
  bit armed = 1'b0;
  period_t exp_moment;
  int swaps = 0;
  logic exp_bank = 1'b0;
  int slots_in_period = 0;
  int exp_slots = BOOT_SCHEDULE_SIZE;

  bit started = 1'b0;
  always @(swap_req) if (started) begin
    edges_since_req = 0; armed = 1'b1;
  end

  // sample just before each rising edge
  always @(posedge clk) if (started) begin
    bit exp_swap;
    exp_swap = armed && (edges_since_req >= 3) && eop && (period_cnt == exp_moment);
    check(swapped == exp_swap, $sformatf("swap %0b expected %0b", swapped, exp_swap));
    check(wbank == ~rbank, "wbank is the other bank");
    check(rbank == exp_bank, "read bank");
    check(booted == (swaps > 0), "booted flag");
    if (phase == TDM_S3) slots_in_period++;
    if (eop) begin
      check(slots_in_period == exp_slots, $sformatf("period of %0d slots, expected %0d", slots_in_period, exp_slots));
      slots_in_period = 0;
    end
    if (exp_swap) begin
      armed = 1'b0; swaps++; exp_bank = ~exp_bank;
      exp_slots = int'(swap_size) + 1;
    end
    if (edges_since_req >= 0) edges_since_req++;
  end

  initial begin
    rst = 1'b0; swap_req = 1'b0; swap_size = '0; swap_moment = '0;
    #1 rst = 1'b1;
    #20.5 rst = 1'b0;
    started = 1'b1;
    repeat (40) @(negedge clk);
    check(booted == 1'b0, "not booted before the first swap");
    for (int k = 0; k < 12; k++) begin
      int g;
      g = 1 + int'($urandom_range(0, 7));
      // wait a random, unaligned time
      #($urandom_range(10, 300) + 0.37);
      swap_size = slot_cnt_t'(g - 1);
      exp_moment = (k == 5) ? period_cnt : {period_cnt[0], period_cnt[2:1]};
      swap_moment = exp_moment;
      swap_req = ~swap_req;
      #1;
      wait (!armed);
      // check the new period length over two full periods
      repeat (2 * 3 * (g + 1) + 2) @(negedge clk);
    end
    check(swaps == 12, $sformatf("%0d swaps", swaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
