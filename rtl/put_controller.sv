// put_controller: enables and disables put operations.
//
// A put request is turned into the global put enable only while the
// synchronised full signal is low; when the FIFO is full the put interface
// is stalled (the sender sees full and must hold its request).  The
// enable-and-stall function is the design's; doing it with one gate is the
// simplest implementation and a choice of this design.
//
// Timing: combinational, within one CLK_put cycle.
`timescale 1ns/1ps
module put_controller (
  input  logic req_put,
  input  logic full,
  output logic en_put
);
  assign en_put = req_put & ~full;
endmodule
