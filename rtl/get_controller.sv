// get_controller: enables get operations and forms the bi-modal empty signal.
//
// With only the conservative "new empty" (0 or 1 full cells) the last item
// of a quiescent FIFO could never be taken out.  The get controller therefore
// keeps a CLK_get register oe that holds the sampled "true empty" condition,
// forced to 1 in the cycle after any get.  The global empty is ne AND oe:
//   - while gets are active, oe is held at 1 and empty follows ne, which is
//     safe against the synchroniser lag;
//   - after an idle get cycle, empty follows the true-empty sample, so a
//     single remaining item becomes visible and can be dequeued.
// en_get = req_get AND NOT empty; valid_get is the stored valid bit on the
// get bus during an enabled get (always 1 in the plain FIFO).
//
// Timing: empty is registered-only (ne and oe are flops); en_get and
// valid_get are combinational in the cycle of the get.  oe resets to 1.
`timescale 1ns/1ps
module get_controller (
  input  logic clk_get,
  input  logic rst_n,
  input  logic req_get,
  input  logic ne,         // new empty, synchronised
  input  logic te,         // true empty, raw
  input  logic bus_valid,  // valid bit on the get bus
  output logic en_get,
  output logic empty,
  output logic valid_get
);
  logic oe;

  always_ff @(posedge clk_get or negedge rst_n) begin
    if (!rst_n) oe <= 1'b1;
    else        oe <= te | en_get;
  end

  assign empty     = ne & oe;
  assign en_get    = req_get & ~empty;
  assign valid_get = en_get & bus_valid;
endmodule
