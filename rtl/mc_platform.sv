`timescale 1ns / 1ps
// NoC platform with run-time mode changes of the TDM schedule (top level).
//
// Connects the mode change SPM, the mode change module (controller,
// broadcast tree, extractors) and NODES network adapters. The system
// processor drives the SPM write port (OCPcore) and the controller (OCPio);
// each node's processor drives its adapter's DMA table (OCPio) and shares the
// adapter's SPM. The processors, their SPMs and the asynchronous router
// network are outside this top: their signals are ports. A packet leaving
// adapter i appears on tx_*[i]; a packet for adapter i is given on rx_*[i].
//
// Clocks: clk is the controller's TDM clock; na_clk[i] is adapter i's TDM
// clock, of the same frequency but possibly skewed (mesochronous). rst resets
// the SPM and the mode change module; na_rst[i] resets adapter i and is
// expected to be rst as it arrives in adapter i's clock region (same skew), so
// all slot and period counters start from the same TDM moment.
//
// Basis: the partition (system processor -> SPM and controller, tree,
// extractors, modified adapters) follows the thesis design. Separate
// per-adapter clock and reset ports and the one-word packet interface
// towards the router network are choices of this implementation.
module mc_platform
  import mc_pkg::*;
#(
  parameter int unsigned NODES   = 4,
  parameter int unsigned SPM_AW  = 16,
  parameter int unsigned MC_SPM_AW = $clog2(2 * MAX_SCHEDULE_SIZE * NODES),
  parameter logic [OCP_ADDR_W-1:0] MC_ADDR = '0
) (
  input  logic                            clk,
  input  logic [NODES-1:0]                na_clk,
  input  logic                            rst,
  input  logic [NODES-1:0]                na_rst,
  // system processor: OCPcore to the mode change SPM
  input  ocp_cmd_e                        sys_spm_mcmd,
  input  logic [OCP_ADDR_W-1:0]           sys_spm_maddr,
  input  logic [OCP_DATA_W-1:0]           sys_spm_mdata,
  output ocp_resp_e                       sys_spm_sresp,
  output logic [OCP_DATA_W-1:0]           sys_spm_sdata,
  // system processor: OCPio to the mode change controller
  input  ocp_cmd_e                        sys_io_mcmd,
  input  logic [OCP_ADDR_W-1:0]           sys_io_maddr,
  input  logic [OCP_DATA_W-1:0]           sys_io_mdata,
  input  logic                            sys_io_mrespaccept,
  output ocp_resp_e                       sys_io_sresp,
  output logic [OCP_DATA_W-1:0]           sys_io_sdata,
  output logic                            sys_io_scmdaccept,
  // node processors: OCPio to the network adapters
  input  ocp_cmd_e  [NODES-1:0]           na_io_mcmd,
  input  logic      [NODES-1:0][OCP_ADDR_W-1:0] na_io_maddr,
  input  logic      [NODES-1:0][OCP_DATA_W-1:0] na_io_mdata,
  input  logic      [NODES-1:0]           na_io_mrespaccept,
  output ocp_resp_e [NODES-1:0]           na_io_sresp,
  output logic      [NODES-1:0][OCP_DATA_W-1:0] na_io_sdata,
  output logic      [NODES-1:0]           na_io_scmdaccept,
  // node SPMs (adapter side)
  output logic      [NODES-1:0][SPM_AW-1:0] spm_addr,
  output logic      [NODES-1:0]           spm_wen,
  output logic      [NODES-1:0][31:0]     spm_wdata,
  input  logic      [NODES-1:0][31:0]     spm_rdata,
  // switched structure
  output logic      [NODES-1:0]           tx_valid,
  output logic      [NODES-1:0][ROUTE_W-1:0] tx_route,
  output logic      [NODES-1:0][SPM_AW-1:0] tx_waddr,
  output logic      [NODES-1:0][31:0]     tx_data,
  input  logic      [NODES-1:0]           rx_valid,
  input  logic      [NODES-1:0][SPM_AW-1:0] rx_waddr,
  input  logic      [NODES-1:0][31:0]     rx_data,
  // observation
  output logic                            mc_busy,
  output slot_cnt_t                       mc_slot_cnt,
  output period_t                         mc_period_cnt,
  output slot_cnt_t [NODES-1:0]           na_slot_cnt,
  output period_t   [NODES-1:0]           na_period_cnt,
  output logic      [NODES-1:0]           na_bank,
  output logic      [NODES-1:0]           na_swapped
);
  logic [MC_SPM_AW-1:0] mcspm_addr;
  mc_word_t             mcspm_rdata;
  tdm_phase_e           mc_phase;

  logic      [NODES-1:0]               swap_req;
  slot_cnt_t [NODES-1:0]               swap_size;
  period_t   [NODES-1:0]               swap_moment;
  logic      [NODES-1:0]               wbank;
  logic      [NODES-1:0]               st_wclk, st_wen;
  logic      [NODES-1:0][SLOT_CNT_W:0] st_waddr;
  mc_word_t  [NODES-1:0]               st_wdata;
  tdm_phase_e [NODES-1:0]              na_phase;

  mc_spm #(.NODES(NODES), .AW(MC_SPM_AW)) u_mc_spm (
    .clk      (clk),
    .rst      (rst),
    .ocp_mcmd (sys_spm_mcmd),
    .ocp_maddr(sys_spm_maddr),
    .ocp_mdata(sys_spm_mdata),
    .ocp_sresp(sys_spm_sresp),
    .ocp_sdata(sys_spm_sdata),
    .raddr    (mcspm_addr),
    .rdata    (mcspm_rdata)
  );

  mc_module #(.NODES(NODES), .SPM_AW(MC_SPM_AW), .MC_ADDR(MC_ADDR)) u_mc (
    .clk            (clk),
    .rst            (rst),
    .ocp_mcmd       (sys_io_mcmd),
    .ocp_maddr      (sys_io_maddr),
    .ocp_mdata      (sys_io_mdata),
    .ocp_mrespaccept(sys_io_mrespaccept),
    .ocp_sresp      (sys_io_sresp),
    .ocp_sdata      (sys_io_sdata),
    .ocp_scmdaccept (sys_io_scmdaccept),
    .spm_addr       (mcspm_addr),
    .spm_rdata      (mcspm_rdata),
    .na_swap_req    (swap_req),
    .na_swap_size   (swap_size),
    .na_swap_moment (swap_moment),
    .na_wbank       (wbank),
    .st_wclk        (st_wclk),
    .st_wen         (st_wen),
    .st_waddr       (st_waddr),
    .st_wdata       (st_wdata),
    .busy           (mc_busy),
    .phase          (mc_phase),
    .slot_cnt       (mc_slot_cnt),
    .period_cnt     (mc_period_cnt)
  );

  for (genvar i = 0; i < NODES; i++) begin : g_node
    network_adapter #(.SPM_AW(SPM_AW)) u_na (
      .clk            (na_clk[i]),
      .rst            (na_rst[i]),
      .ocp_mcmd       (na_io_mcmd[i]),
      .ocp_maddr      (na_io_maddr[i]),
      .ocp_mdata      (na_io_mdata[i]),
      .ocp_mrespaccept(na_io_mrespaccept[i]),
      .ocp_sresp      (na_io_sresp[i]),
      .ocp_sdata      (na_io_sdata[i]),
      .ocp_scmdaccept (na_io_scmdaccept[i]),
      .spm_addr       (spm_addr[i]),
      .spm_wen        (spm_wen[i]),
      .spm_wdata      (spm_wdata[i]),
      .spm_rdata      (spm_rdata[i]),
      .tx_valid       (tx_valid[i]),
      .tx_route       (tx_route[i]),
      .tx_waddr       (tx_waddr[i]),
      .tx_data        (tx_data[i]),
      .rx_valid       (rx_valid[i]),
      .rx_waddr       (rx_waddr[i]),
      .rx_data        (rx_data[i]),
      .swap_req       (swap_req[i]),
      .swap_size      (swap_size[i]),
      .swap_moment    (swap_moment[i]),
      .st_wclk        (st_wclk[i]),
      .st_wen         (st_wen[i]),
      .st_waddr       (st_waddr[i]),
      .st_wdata       (st_wdata[i]),
      .wbank          (wbank[i]),
      .phase          (na_phase[i]),
      .slot_cnt       (na_slot_cnt[i]),
      .period_cnt     (na_period_cnt[i]),
      .rbank          (na_bank[i]),
      .swapped        (na_swapped[i])
    );
  end
endmodule
