`timescale 1ns / 1ps
// Broadcast tree network of the mode change module.
//
// Carries every token (node ID tag and schedule word) pushed by the mode
// change controller to all LEAVES extractors, unchanged. The tree is built
// from click-element forks to three and to two (mc_tree_node); every path from
// the root to a leaf crosses the same number of forks, tree_levels(LEAVES).
// The shape follows mc_pkg::tree_level_info: a level uses as many forks to
// three as it can and finishes with one or two forks to two, and the forks of
// a level feed the forks (or leaves) of the level below in order.
//
// The swap command channel (a 2-phase request with the swap moment as bundled
// data, no acknowledge) is only wired from the root to every leaf; it is not
// buffered.
//
// Channels: in_* is the root (from the controller), out_* index the leaves
// (extractor i on leaf i). All data channels are 2-phase bundled data.
//
// Basis: forks to two and three only, equal depth on every path and click
// forks that capture data follow the thesis design; the exact rule for how
// many forks of each kind a level gets is this implementation's own.
module mc_broadcast_tree
  import mc_pkg::*;
#(
  parameter int unsigned LEAVES   = 4,
  parameter int unsigned W        = 23,
  parameter int unsigned DELAY_NS = 1
) (
  input  logic                         rst,
  input  logic                         in_req,
  input  logic [W-1:0]                 in_data,
  output logic                         in_ack,
  input  logic                         in_swap_req,
  input  period_t                      in_swap_moment,
  output logic [LEAVES-1:0]            out_req,
  output logic [LEAVES-1:0][W-1:0]     out_data,
  input  logic [LEAVES-1:0]            out_ack,
  output logic [LEAVES-1:0]            out_swap_req,
  output period_t [LEAVES-1:0]         out_swap_moment
);
  localparam int LEVELS = tree_levels(LEAVES);
  localparam int TOTAL  = tree_level_offset(LEAVES, LEVELS);

  // Flat channel array: level l's outputs occupy
  // [tree_level_offset(l), tree_level_offset(l+1)); the root is index TOTAL.
  logic [TOTAL:0]        c_req;
  logic [TOTAL:0]        c_ack;
  logic [TOTAL:0][W-1:0] c_data;

  assign c_req[TOTAL]  = in_req;
  assign c_data[TOTAL] = in_data;
  assign in_ack        = c_ack[TOTAL];

  assign out_req          = c_req[LEAVES-1:0];
  assign out_data         = c_data[LEAVES-1:0];
  assign c_ack[LEAVES-1:0] = out_ack;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int THREES = tree_level_info(LEAVES, l, 0);
    localparam int TWOS   = tree_level_info(LEAVES, l, 1);
    localparam int OUT0   = tree_level_offset(LEAVES, l);
    localparam int IN0    = (l == LEVELS - 1) ? TOTAL : tree_level_offset(LEAVES, l + 1);
    for (genvar n = 0; n < THREES + TWOS; n++) begin : g_node
      localparam int F  = (n < THREES) ? 3 : 2;
      localparam int OB = OUT0 + ((n < THREES) ? 3 * n : 3 * THREES + 2 * (n - THREES));
      mc_tree_node #(.FANOUT(F), .W(W), .DELAY_NS(DELAY_NS)) u_node (
        .rst     (rst),
        .in_req  (c_req[IN0 + n]),
        .in_data (c_data[IN0 + n]),
        .in_ack  (c_ack[IN0 + n]),
        .out_req (c_req[OB +: F]),
        .out_data(c_data[OB +: F]),
        .out_ack (c_ack[OB +: F])
      );
    end
  end

  assign out_swap_req    = {LEAVES{in_swap_req}};
  assign out_swap_moment = {LEAVES{in_swap_moment}};

  initial assert (LEAVES >= 2) else $error("broadcast tree needs at least two leaves");
endmodule
