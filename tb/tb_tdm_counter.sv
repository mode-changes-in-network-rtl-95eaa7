`timescale 1ns / 1ps
// Test of tdm_counter against a cycle-by-cycle reference: three-cycle slots,
// wrap after the boot schedule's 10 slots, one-hot period rotation, eop only
// in the last cycle of a period, and a new schedule size loaded at eop taking
// effect in the next period.
//
// The slot timing and the boot size of 10 come from the thesis design; the
// reference model is written independently of the RTL.
module tb_tdm_counter;
  import mc_pkg::*;
  logic clk = 1'b0, rst;
  logic set_max;
  slot_cnt_t new_max;
  tdm_phase_e phase;
  slot_cnt_t slot_cnt, max_slot;
  period_t period_cnt;
  logic eop;
  int checks = 0, failures = 0;

  tdm_counter dut (.*);
  always #5 clk = ~clk;

  int r_phase, r_slot, r_max;
  period_t r_period;
  int periods = 0;

  initial begin
    rst = 1'b0; set_max = 1'b0; new_max = '0;
    #1 rst = 1'b1;
    #20;
    @(negedge clk) rst = 1'b0;
    r_phase = 0; r_slot = 0; r_max = BOOT_SCHEDULE_SIZE - 1; r_period = period_t'(1);
    for (int cyc = 0; cyc < 600; cyc++) begin
      checks++;
      if (phase != tdm_phase_e'(r_phase) || slot_cnt != slot_cnt_t'(r_slot) ||
          period_cnt != r_period || max_slot != slot_cnt_t'(r_max) ||
          eop != (r_phase == 2 && r_slot == r_max)) begin
        failures++;
        $display("FAIL cycle %0d: phase %0d/%0d slot %0d/%0d period %b/%b eop %b",
                 cyc, phase, r_phase, slot_cnt, r_slot, period_cnt, r_period, eop);
      end
      // load a new size at the end of the third period, another at the sixth
      set_max = 1'b0;
      if (eop && periods == 2) begin set_max = 1'b1; new_max = 4; end
      if (eop && periods == 5) begin set_max = 1'b1; new_max = 1; end
      // reference update for the coming edge
      if (r_phase == 2) begin
        if (r_slot == r_max) begin
          r_slot = 0;
          r_period = {r_period[PERIOD_CNT_SIZE-2:0], r_period[PERIOD_CNT_SIZE-1]};
          periods++;
        end else r_slot++;
      end
      r_phase = (r_phase + 1) % 3;
      if (set_max) r_max = int'(new_max);
      @(negedge clk);
    end
    checks++;
    if (periods < 20) begin failures++; $display("FAIL: too few periods %0d", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
