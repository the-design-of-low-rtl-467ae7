// mcrs_get_controller: get controller of the mixed-clock relay station.
//
// The relay station sends a packet downstream on every clk_get cycle: a
// valid one when the FIFO holds an item and the downstream station is not
// stopping it, an invalid one otherwise.  The empty condition is the same
// bi-modal one as in get_controller (ne AND oe, oe holding the true-empty
// sample and forced to 1 after a get), so the last item of a quiescent ring
// still leaves.  en_get = NOT stop_in AND NOT empty; valid_out is the stored
// valid bit during an enabled get.
//
// Timing: en_get and valid_out are combinational in the cycle of the get;
// oe resets to 1.
`timescale 1ns/1ps
module mcrs_get_controller (
  input  logic clk_get,
  input  logic rst_n,
  input  logic stop_in,
  input  logic ne,
  input  logic te,
  input  logic bus_valid,
  output logic en_get,
  output logic valid_out
);
  logic oe, empty;

  always_ff @(posedge clk_get or negedge rst_n) begin
    if (!rst_n) oe <= 1'b1;
    else        oe <= te | en_get;
  end

  assign empty     = ne & oe;
  assign en_get    = ~stop_in & ~empty;
  assign valid_out = en_get & bus_valid;
endmodule
