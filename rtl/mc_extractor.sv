`timescale 1ns / 1ps
// Schedule extractor: asynchronous token consumer at one leaf of the
// broadcast tree, with a two-state asynchronous state machine that writes
// the local network adapter's slot table.
//
// Every token of the tree is consumed (click = state != delayed request, an
// XOR), but only tokens whose ID tag equals ID are acted on. In state IDLE a
// matching token carries the size of the incoming schedule view (as its
// largest slot index, size - 1): it is stored and the machine enters EXTRACT.
// In EXTRACT every matching token is a slot table entry: it is written to the
// idle bank at address {wbank, counter}, and the counter increments; when the
// counter equals the stored size the counter returns to 0 and the machine to
// IDLE, ready for the size word of the next schedule.
//
// Slot table write port: st_wclk is the click pulse, st_waddr is the bank bit
// from the adapter (the bank not being read) above the counter, st_wdata the
// token's word, st_wen high for a matching token in EXTRACT. The swap command
// channel is passed on to the adapter with the stored size added to its
// bundled data. The matched delay on the request covers the ID comparison and
// the slot table write.
//
// Basis: the XOR click, the idle/extract machine, the size-first protocol
// and the click-clocked write port follow the thesis design. Carrying size - 1
// instead of the size, the reset value of the size register (all ones) and
// the delay value are choices of this implementation.
module mc_extractor
  import mc_pkg::*;
#(
  parameter int unsigned ID       = 0,
  parameter int unsigned ID_W     = 2,
  parameter int unsigned DELAY_NS = 2
) (
  input  logic                  rst,
  // data channel from the tree (2-phase bundled data)
  input  logic                  in_req,
  input  logic [ID_W-1:0]       in_id,
  input  mc_word_t              in_data,
  output logic                  in_ack,
  // swap command channel from the tree
  input  logic                  in_swap_req,
  input  period_t               in_swap_moment,
  // swap command channel to the network adapter
  output logic                  na_swap_req,
  output slot_cnt_t             na_swap_size,
  output period_t               na_swap_moment,
  // slot table write port
  input  logic                  wbank,
  output logic                  st_wclk,
  output logic                  st_wen,
  output logic [SLOT_CNT_W:0]   st_waddr,
  output mc_word_t              st_wdata
);
  typedef enum logic {EX_IDLE, EX_EXTRACT} ex_state_e;

  logic      state;
  logic      del_req;
  logic      click;
  ex_state_e fsm_q;
  slot_cnt_t counter;
  slot_cnt_t size_q;
  logic      match;
  logic      last_slot;

  matched_delay #(.DELAY_NS(DELAY_NS)) u_delay (.a(in_req), .z(del_req));

  assign click     = state ^ del_req;
  assign match     = (in_id == ID_W'(ID));
  assign last_slot = (counter == size_q);

  always_ff @(posedge click or posedge rst) begin
    if (rst) begin
      state   <= 1'b0;
      fsm_q   <= EX_IDLE;
      counter <= '0;
      size_q  <= '1;
    end else begin
      state <= ~state;
      if (match) begin
        unique case (fsm_q)
          EX_IDLE: begin
            size_q <= in_data[SLOT_CNT_W-1:0];
            fsm_q  <= EX_EXTRACT;
          end
          EX_EXTRACT: begin
            if (last_slot) begin
              counter <= '0;
              fsm_q   <= EX_IDLE;
            end else begin
              counter <= counter + 1'b1;
            end
          end
          default: fsm_q <= EX_IDLE;
        endcase
      end
    end
  end

  assign in_ack = state;

  assign st_wclk  = click;
  assign st_wen   = match && (fsm_q == EX_EXTRACT);
  assign st_waddr = {wbank, counter};
  assign st_wdata = in_data;

  assign na_swap_req    = in_swap_req;
  assign na_swap_size   = size_q;
  assign na_swap_moment = in_swap_moment;
endmodule
