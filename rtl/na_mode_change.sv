`timescale 1ns / 1ps
// Mode change and timing logic of a network adapter.
//
// Holds the adapter's TDM counters (tdm_counter: slot counter with a
// reconfigurable ceiling, one-hot period counter, three-cycle slot timing),
// the bank-select flip-flop of the two-bank slot table, and the logic that
// applies a new schedule. The 2-phase swap command from the mode change
// controller is first synchronized (swap_sync, SYNC_STAGES flip-flops). A
// toggle of the synchronized level marks a pending swap and latches its
// bundled data: the moment (one-hot period) and the new schedule's last slot
// index. In the last cycle of the period whose counter equals the moment,
// the bank select toggles (the adapter now reads the freshly written bank and
// the extractor may write the other one) and the new ceiling is loaded, so
// the next period has the new length.
//
// rbank is the MSB of the slot table read address and wbank (its inverse)
// the MSB of the write address. booted is low until the first swap; before it
// the slot table holds no schedule. swapped pulses for one cycle at each swap.
//
// Basis: the two-flip-flop synchronizer, the shared counters, the bank
// select flip-flop and the swap in the last cycle of the moment period follow
// the thesis design. The booted flag and the reset bank (read bank 0) are
// choices of this implementation.
module na_mode_change
  import mc_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst,
  // swap command channel (asynchronous to clk)
  input  logic       swap_req,
  input  slot_cnt_t  swap_size,
  input  period_t    swap_moment,
  // TDM state
  output tdm_phase_e phase,
  output slot_cnt_t  slot_cnt,
  output period_t    period_cnt,
  output logic       eop,
  // slot table bank selection
  output logic       rbank,
  output logic       wbank,
  output logic       booted,
  output logic       swapped
);
  logic      req_sync;
  logic      req_seen;
  logic      pending;
  period_t   moment_q;
  slot_cnt_t size_q;
  slot_cnt_t max_slot;

  swap_sync #(.STAGES(SYNC_STAGES)) u_sync (
    .clk(clk), .rst(rst), .d(swap_req), .q(req_sync)
  );

  assign swapped = pending && eop && (period_cnt == moment_q);

  tdm_counter u_tdm (
    .clk       (clk),
    .rst       (rst),
    .set_max   (swapped),
    .new_max   (size_q),
    .phase     (phase),
    .slot_cnt  (slot_cnt),
    .max_slot  (max_slot),
    .period_cnt(period_cnt),
    .eop       (eop)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      req_seen <= 1'b0;
      pending  <= 1'b0;
      moment_q <= '0;
      size_q   <= '0;
      rbank    <= 1'b0;
      booted   <= 1'b0;
    end else begin
      req_seen <= req_sync;
      if (req_sync != req_seen) begin
        pending  <= 1'b1;
        moment_q <= swap_moment;
        size_q   <= swap_size;
      end else if (swapped) begin
        pending <= 1'b0;
      end
      if (swapped) begin
        rbank  <= ~rbank;
        booted <= 1'b1;
      end
    end
  end

  assign wbank = ~rbank;
endmodule
