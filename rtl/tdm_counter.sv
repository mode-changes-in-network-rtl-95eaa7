`timescale 1ns / 1ps
// TDM slot counter, schedule period counter and timing state machine.
//
// Used identically by the mode change controller and by every network
// adapter, so that all of them share one mesochronous notion of the current
// slot and period. The timing machine has three states, one clock cycle
// each; a full round is one slot. In the third state the slot counter
// advances; if it holds the last slot of the schedule (equal to max_slot,
// the schedule size minus one) it returns to 0, the one-hot period counter
// rotates one place towards its MSB (MSB wraps to LSB), and eop (end of
// period) is high for that cycle.
//
// set_max loads new_max as the last slot index; it takes effect at the next
// comparison, so loading it in the eop cycle makes the next period use the
// new size. Reset: slot 0, phase S1, period 0...01, last slot index
// BOOT_SCHEDULE_SIZE - 1.
//
// Basis: the three one-cycle states per slot, the reconfigurable ceiling,
// the one-hot period counter and the end-of-period signal follow the thesis
// design. The rotation direction and reset values follow its published
// package constants (boot schedule of 10 slots, period counter 0...01).
module tdm_counter
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       set_max,
  input  slot_cnt_t  new_max,
  output tdm_phase_e phase,
  output slot_cnt_t  slot_cnt,
  output slot_cnt_t  max_slot,
  output period_t    period_cnt,
  output logic       eop
);
  logic last_slot;

  assign last_slot = (slot_cnt == max_slot);
  assign eop       = (phase == TDM_S3) && last_slot;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase      <= TDM_S1;
      slot_cnt   <= '0;
      max_slot   <= slot_cnt_t'(BOOT_SCHEDULE_SIZE - 1);
      period_cnt <= period_t'(1);
    end else begin
      unique case (phase)
        TDM_S1:  phase <= TDM_S2;
        TDM_S2:  phase <= TDM_S3;
        default: phase <= TDM_S1;
      endcase
      if (phase == TDM_S3) begin
        if (last_slot) begin
          slot_cnt   <= '0;
          period_cnt <= {period_cnt[PERIOD_CNT_SIZE-2:0], period_cnt[PERIOD_CNT_SIZE-1]};
        end else begin
          slot_cnt <= slot_cnt + 1'b1;
        end
      end
      if (set_max) max_slot <= new_max;
    end
  end
endmodule
