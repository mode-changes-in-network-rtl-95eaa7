`timescale 1ns / 1ps
// Synchronizer for the 2-phase swap command signal at a network adapter.
//
// The swap command toggles in the controller's part of the mesochronous
// domain and reaches each adapter through asynchronous wiring, with unknown
// skew, so it is passed through STAGES flip-flops clocked by the adapter's
// clock before the adapter looks at it. Its bundled data (moment and size)
// are stable long before the toggle reaches the last stage. Output q is the
// synchronized level; the adapter detects a toggle by comparing it with its
// previous value. Reset clears all stages.
//
// Basis: a chain of flip-flops on the 2-phase signal, two by default,
// follows the thesis design; the reset is a choice of this implementation.
module swap_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic [STAGES-1:0] ff;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) ff <= '0;
    else     ff <= {ff[STAGES-2:0], d};
  end

  assign q = ff[STAGES-1];

  initial assert (STAGES >= 2) else $error("a synchronizer needs at least two stages");
endmodule
