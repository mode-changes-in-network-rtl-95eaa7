`timescale 1ns / 1ps
// Broadcast tree node: a click-element fork that captures data.
//
// One 2-phase bundled-data input channel is copied to FANOUT output channels.
// A single state flip-flop drives the input acknowledge and every output
// request. A click pulse is generated when a new token is waiting at the
// input (state differs from the delayed input request) and every output has
// acknowledged the previous token (state equals each output acknowledge).
// The rising edge of click toggles the state and captures the token (node ID
// tag and schedule word) into the data register that drives all outputs, so
// the fork behaves as a handshake latch followed by a fork. The input request
// passes through a matched delay so the data are stable when captured.
//
// Timing: there is no clock. A token is accepted DELAY_NS after its request
// toggles, provided all consumers have taken the previous one. Reset clears
// state and data (all channels idle with request = acknowledge = 0).
//
// Basis: the click function with one acknowledge term per output and the
// captured data follow the thesis design; the matched delay on the input
// request and its value are choices of this implementation.
module mc_tree_node #(
  parameter int unsigned FANOUT   = 2,
  parameter int unsigned W        = 23,
  parameter int unsigned DELAY_NS = 1
) (
  input  logic                         rst,
  input  logic                         in_req,
  input  logic [W-1:0]                 in_data,
  output logic                         in_ack,
  output logic [FANOUT-1:0]            out_req,
  output logic [FANOUT-1:0][W-1:0]     out_data,
  input  logic [FANOUT-1:0]            out_ack
);
  logic         state;
  logic         del_req;
  logic         click;
  logic [W-1:0] data_q;

  matched_delay #(.DELAY_NS(DELAY_NS)) u_delay (.a(in_req), .z(del_req));

  // click = state != req  and  state == ack(i) for every output
  assign click = (state != del_req) && (out_ack == {FANOUT{state}});

  always_ff @(posedge click or posedge rst) begin
    if (rst) begin
      state  <= 1'b0;
      data_q <= '0;
    end else begin
      state  <= ~state;
      data_q <= in_data;
    end
  end

  assign in_ack   = state;
  assign out_req  = {FANOUT{state}};
  assign out_data = {FANOUT{data_q}};
endmodule
