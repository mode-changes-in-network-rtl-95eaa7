`timescale 1ns / 1ps
// Mode change module: controller, broadcast tree and one extractor per node.
//
// The controller (mesochronous, clk) pushes the size word and the slot
// entries of every node's schedule view into the broadcast tree as 2-phase
// tokens tagged with the node ID. The tree delivers every token to every
// extractor; extractor i keeps only the tokens tagged i and writes them into
// the idle bank of network adapter i's slot table through the st_* port
// (clocked by the extractor's own click pulse). The swap command channel
// (2-phase request, moment) runs from the controller through the tree wiring
// to every extractor, which adds the size of the new view and hands it to
// its adapter on na_swap_*.
//
// Per-node signals are arrays indexed by node: na_wbank[i] is the write bank
// chosen by adapter i. Tree stages and extractors use DELAY_NS matched delays.
//
// Basis: the structure follows the thesis design; ID tags equal to the node
// index and the delay values are choices of this implementation.
module mc_module
  import mc_pkg::*;
#(
  parameter int unsigned NODES     = 4,
  parameter int unsigned ID_W      = (NODES > 1) ? $clog2(NODES) : 1,
  parameter int unsigned SPM_AW    = $clog2(2 * MAX_SCHEDULE_SIZE * NODES),
  parameter logic [OCP_ADDR_W-1:0] MC_ADDR = '0,
  parameter int unsigned TREE_DELAY_NS = 1,
  parameter int unsigned EXTR_DELAY_NS = 2
) (
  input  logic                      clk,
  input  logic                      rst,
  // OCPio slave port from the system processor
  input  ocp_cmd_e                  ocp_mcmd,
  input  logic [OCP_ADDR_W-1:0]     ocp_maddr,
  input  logic [OCP_DATA_W-1:0]     ocp_mdata,
  input  logic                      ocp_mrespaccept,
  output ocp_resp_e                 ocp_sresp,
  output logic [OCP_DATA_W-1:0]     ocp_sdata,
  output logic                      ocp_scmdaccept,
  // mode change SPM read port
  output logic [SPM_AW-1:0]         spm_addr,
  input  mc_word_t                  spm_rdata,
  // to the network adapters
  output logic      [NODES-1:0]     na_swap_req,
  output slot_cnt_t [NODES-1:0]     na_swap_size,
  output period_t   [NODES-1:0]     na_swap_moment,
  input  logic      [NODES-1:0]     na_wbank,
  output logic      [NODES-1:0]     st_wclk,
  output logic      [NODES-1:0]     st_wen,
  output logic      [NODES-1:0][SLOT_CNT_W:0] st_waddr,
  output mc_word_t  [NODES-1:0]     st_wdata,
  // observation
  output logic                      busy,
  output tdm_phase_e                phase,
  output slot_cnt_t                 slot_cnt,
  output period_t                   period_cnt
);
  localparam int unsigned TW = ID_W + SLOT_W;

  logic              root_req, root_ack, root_swap_req;
  logic [ID_W-1:0]   root_id;
  mc_word_t          root_data;
  period_t           root_moment;

  logic    [NODES-1:0]         leaf_req, leaf_ack, leaf_swap_req;
  logic    [NODES-1:0][TW-1:0] leaf_data;
  period_t [NODES-1:0]         leaf_moment;

  mc_controller #(
    .NODES(NODES), .ID_W(ID_W), .SPM_AW(SPM_AW), .MC_ADDR(MC_ADDR)
  ) u_controller (
    .clk            (clk),
    .rst            (rst),
    .ocp_mcmd       (ocp_mcmd),
    .ocp_maddr      (ocp_maddr),
    .ocp_mdata      (ocp_mdata),
    .ocp_mrespaccept(ocp_mrespaccept),
    .ocp_sresp      (ocp_sresp),
    .ocp_sdata      (ocp_sdata),
    .ocp_scmdaccept (ocp_scmdaccept),
    .spm_addr       (spm_addr),
    .spm_rdata      (spm_rdata),
    .tree_req       (root_req),
    .tree_id        (root_id),
    .tree_data      (root_data),
    .tree_ack       (root_ack),
    .swap_req       (root_swap_req),
    .swap_moment    (root_moment),
    .busy           (busy),
    .phase          (phase),
    .slot_cnt       (slot_cnt),
    .period_cnt     (period_cnt)
  );

  mc_broadcast_tree #(
    .LEAVES(NODES), .W(TW), .DELAY_NS(TREE_DELAY_NS)
  ) u_tree (
    .rst            (rst),
    .in_req         (root_req),
    .in_data        ({root_id, root_data}),
    .in_ack         (root_ack),
    .in_swap_req    (root_swap_req),
    .in_swap_moment (root_moment),
    .out_req        (leaf_req),
    .out_data       (leaf_data),
    .out_ack        (leaf_ack),
    .out_swap_req   (leaf_swap_req),
    .out_swap_moment(leaf_moment)
  );

  for (genvar i = 0; i < NODES; i++) begin : g_extractor
    mc_extractor #(
      .ID(i), .ID_W(ID_W), .DELAY_NS(EXTR_DELAY_NS)
    ) u_extractor (
      .rst           (rst),
      .in_req        (leaf_req[i]),
      .in_id         (leaf_data[i][TW-1:SLOT_W]),
      .in_data       (leaf_data[i][SLOT_W-1:0]),
      .in_ack        (leaf_ack[i]),
      .in_swap_req   (leaf_swap_req[i]),
      .in_swap_moment(leaf_moment[i]),
      .na_swap_req   (na_swap_req[i]),
      .na_swap_size  (na_swap_size[i]),
      .na_swap_moment(na_swap_moment[i]),
      .wbank         (na_wbank[i]),
      .st_wclk       (st_wclk[i]),
      .st_wen        (st_wen[i]),
      .st_waddr      (st_waddr[i]),
      .st_wdata      (st_wdata[i])
    );
  end
endmodule
