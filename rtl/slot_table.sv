`timescale 1ns / 1ps
// Slot table of a network adapter: a simple dual-port memory of two banks.
//
// Each bank holds one schedule view of up to 2**SLOT_CNT_W entries; the
// address MSB selects the bank. The write-only port belongs to the schedule
// extractor and is clocked by the extractor's click pulse (wclk); the
// read-only port belongs to the adapter and is read synchronously on clk
// (data appear the cycle after the address). The adapter reads the active
// bank and lets the extractor write the other one, so a new schedule can be
// loaded while the old one runs.
//
// The memory is not reset: the boot schedule is written through the write
// port, or the adapter ignores the table until its first schedule swap.
//
// Basis: the doubled table with the bank in the address MSB and the
// extractor-owned write port follow the thesis design; the absence of a
// reset is a choice of this implementation.
module slot_table
  import mc_pkg::*;
#(
  parameter int unsigned AW = SLOT_CNT_W + 1,
  parameter int unsigned DW = SLOT_W
) (
  // write port (extractor)
  input  logic          wclk,
  input  logic          wen,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  // read port (network adapter)
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge wclk) begin
    if (wen) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
  end
endmodule
