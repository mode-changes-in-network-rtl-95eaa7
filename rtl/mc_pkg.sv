`timescale 1ns / 1ps
// Shared constants, types and tree-shape functions of the TDM mode change
// module.
//
// A schedule word (one slot table entry) is {valid, dma index, postpone,
// route}: the valid flag enables sending in the slot, the DMA index selects
// the DMA table entry (one per destination), the postpone field says by how
// many clock cycles the slot is postponed, and the route is the source route
// of the packet sent in the slot. Schedules are at most MAX_SCHEDULE_SIZE
// slots; slot counters are SLOT_CNT_W bits wide and slot table addresses one
// bit wider (the extra MSB selects one of the two banks). The schedule period
// counter is one-hot and PERIOD_CNT_SIZE bits wide: a swap is commanded for
// PERIOD_CNT_SIZE-1 periods after the current one.
//
// The OCP constants are the command and response codes of the processor
// ports (OCPio and OCPcore subsets).
//
// The broadcast tree functions describe a tree built only from forks to two
// and three, with the same number of pipeline stages on every root-to-leaf
// path. Level 0 is the level of stages next to the leaves; the number of
// nodes of a level is the number of outputs of the level above it.
//
// Basis: the maximum schedule size (256), the boot schedule size (10), the
// three-bit one-hot period counter and the SPM sizing follow the thesis
// design; the field order and widths of the schedule word (21 bits) and the
// OCP encodings are choices of this implementation.
package mc_pkg;

  // ---------------------------------------------------------------- sizes
  parameter int unsigned MAX_SCHEDULE_SIZE  = 256;
  parameter int unsigned BOOT_SCHEDULE_SIZE = 10;
  parameter int unsigned SLOT_CNT_W         = $clog2(MAX_SCHEDULE_SIZE);
  parameter int unsigned PERIOD_CNT_SIZE    = 3;
  parameter int unsigned DMA_IND_W          = 2;
  parameter int unsigned POSTPONE_W         = 2;
  parameter int unsigned ROUTE_W            = 16;
  parameter int unsigned SLOT_W             = 1 + DMA_IND_W + POSTPONE_W + ROUTE_W;

  typedef logic [SLOT_CNT_W-1:0]      slot_cnt_t;
  typedef logic [PERIOD_CNT_SIZE-1:0] period_t;
  typedef logic [SLOT_W-1:0]          mc_word_t;

  // Three clock cycles per TDM slot.
  typedef enum logic [1:0] {TDM_S1 = 2'd0, TDM_S2 = 2'd1, TDM_S3 = 2'd2} tdm_phase_e;

  typedef struct packed {
    logic                  valid;
    logic [DMA_IND_W-1:0]  dma_idx;
    logic [POSTPONE_W-1:0] postpone;
    logic [ROUTE_W-1:0]    route;
  } slot_entry_t;

  // ---------------------------------------------------------------- OCP
  parameter int unsigned OCP_ADDR_W = 32;
  parameter int unsigned OCP_DATA_W = 32;

  typedef enum logic [2:0] {
    OCP_CMD_IDLE = 3'b000,
    OCP_CMD_WR   = 3'b001,
    OCP_CMD_RD   = 3'b010
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    OCP_RESP_NULL = 2'b00,
    OCP_RESP_DVA  = 2'b01,
    OCP_RESP_FAIL = 2'b10,
    OCP_RESP_ERR  = 2'b11
  } ocp_resp_e;

  // ------------------------------------------------------ tree shape
  // Number of fork levels needed to reach n leaves.
  function automatic int tree_levels(input int n);
    int levels = 0;
    int nodes  = n;
    while (nodes > 1) begin
      nodes  = (nodes + 2) / 3;
      levels = levels + 1;
    end
    return levels;
  endfunction

  // Forks of level lvl: which = 0 gives the forks to three, 1 the forks to
  // two, 2 the number of outputs of the level.
  function automatic int tree_level_info(input int n, input int lvl, input int which);
    int outs   = n;
    int threes = 0;
    int twos   = 0;
    int temp;
    int ups;
    for (int l = 0; l <= lvl; l++) begin
      temp   = outs;
      ups    = 0;
      threes = 0;
      twos   = 0;
      while (temp > 4) begin
        threes = threes + 1;
        temp   = temp - 3;
        ups    = ups + 1;
      end
      if (temp == 3) begin
        threes = threes + 1;
        ups    = ups + 1;
      end else if (temp == 4) begin
        twos = 2;
        ups  = ups + 2;
      end else if (temp == 2) begin
        twos = 1;
        ups  = ups + 1;
      end
      if (l < lvl) outs = ups;
    end
    if (which == 0) return threes;
    if (which == 1) return twos;
    return outs;
  endfunction

  // Index of the first channel driven by the outputs of level lvl in the
  // flat channel array of the tree (level 0 outputs are the leaves).
  function automatic int tree_level_offset(input int n, input int lvl);
    int off = 0;
    for (int l = 0; l < lvl; l++) off = off + tree_level_info(n, l, 2);
    return off;
  endfunction

endpackage
