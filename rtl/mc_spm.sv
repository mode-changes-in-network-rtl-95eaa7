`timescale 1ns / 1ps
// Mode change scratch pad memory (SPM).
//
// Simple dual-port buffer between the system processor and the mode change
// controller, sized for two schedules of the maximum size for all nodes
// (2 * MAX_SCHEDULE_SIZE * NODES words), so software can load the next
// schedule while the controller still pushes the previous one.
//
// The write-only port is an OCPcore slave: a write command (MCmd = WR) is
// stored at word address MAddr[2 +: AW] at the clock edge, and DVA is
// returned in the following cycle. A read command is answered with DVA and
// zero data, since the processor side is write-only. The read-only port of
// the controller is synchronous: rdata holds the word at raddr one cycle
// after raddr is presented. The memory is not reset.
//
// Basis: the size (two maximum schedules for all nodes) and the two ports
// follow the thesis design; the address mapping, response timing and the
// zero read data are choices of this implementation.
module mc_spm
  import mc_pkg::*;
#(
  parameter int unsigned NODES = 4,
  parameter int unsigned DEPTH = 2 * MAX_SCHEDULE_SIZE * NODES,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst,
  // OCPcore write port (system processor)
  input  ocp_cmd_e              ocp_mcmd,
  input  logic [OCP_ADDR_W-1:0] ocp_maddr,
  input  logic [OCP_DATA_W-1:0] ocp_mdata,
  output ocp_resp_e             ocp_sresp,
  output logic [OCP_DATA_W-1:0] ocp_sdata,
  // synchronous read port (mode change controller)
  input  logic [AW-1:0]         raddr,
  output mc_word_t              rdata
);
  mc_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ocp_mcmd == OCP_CMD_WR) mem[ocp_maddr[2 +: AW]] <= ocp_mdata[SLOT_W-1:0];
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) ocp_sresp <= OCP_RESP_NULL;
    else     ocp_sresp <= (ocp_mcmd != OCP_CMD_IDLE) ? OCP_RESP_DVA : OCP_RESP_NULL;
  end

  assign ocp_sdata = '0;
endmodule
