`timescale 1ns / 1ps
// Matched delay element (behavioural model).
//
// In the asynchronous click-element components the request of a 2-phase
// bundled-data channel passes through a matched delay before it may fire the
// local click pulse, so that the bundled data (and any logic computed from it)
// are stable when they are captured. On silicon this is a chain of delay
// cells sized for the logic it matches (on an FPGA, a chain of LUTs each
// configured as a buffer). It has no logic function of its own, so it is
// modelled here as a pure propagation delay of DELAY_NS nanoseconds; a
// synthesis flow replaces it with a delay-cell chain.
//
// Interface: a is the incoming request, z the delayed request.
//
// Basis: the matched delay on the request path follows the thesis design;
// the delay values are choices of this implementation.
module matched_delay #(
  parameter int unsigned DELAY_NS = 1
) (
  input  logic a,
  output logic z
);
  assign #(DELAY_NS) z = a;
endmodule
