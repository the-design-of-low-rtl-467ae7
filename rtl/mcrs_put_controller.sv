// mcrs_put_controller: put controller of the mixed-clock relay station.
//
// The upstream relay station presents a packet on every clk_put cycle, valid
// or not.  Only valid packets are enqueued: en_put = valid_in AND NOT full.
// The synchronised full signal is returned upstream as stop_out, so the
// upstream station holds its packet until there is room again (the relay
// station stopping mechanism replaces the FIFO's full/req handshake).
//
// Timing: combinational within one clk_put cycle.
`timescale 1ns/1ps
module mcrs_put_controller (
  input  logic valid_in,
  input  logic full,
  output logic en_put,
  output logic stop_out
);
  assign en_put   = valid_in & ~full;
  assign stop_out = full;
endmodule
