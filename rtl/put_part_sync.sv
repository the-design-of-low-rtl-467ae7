// put_part_sync: the synchronous put half of one FIFO cell.
//
// The cell holding the put token (ptok_in high: the token flop of the ring
// neighbour feeds it) is the tail of the queue.  On a CLK_put edge with
// en_put high it loads the put bus (req_put as the valid bit, data_put) into
// its register and records the put by flipping its put toggle; at the same
// edge every token flop with en_put high takes its ptok_in, so the token
// moves one cell along the ring.  The put toggle together with the get
// toggle of the get half forms the cell's full/empty state (full while they
// differ): this stands in for the set-reset latch of the cell drawing, which
// is set from one clock domain and reset from the other.
//
// Timing: one put per CLK_put cycle; the new state is visible right after
// the edge.  Token, toggle and register reset asynchronously (active low).
`timescale 1ns/1ps
module put_part_sync #(
  parameter int unsigned W          = mtf_pkg::DEF_WIDTH,
  parameter bit          INIT_TOKEN = 1'b0
) (
  input  logic         clk_put,
  input  logic         rst_n,
  input  logic         en_put,    // global put enable from the put controller
  input  logic         req_put,   // stored as the item's valid bit
  input  logic [W-1:0] data_put,
  input  logic         ptok_in,   // token offered by the ring neighbour
  output logic         ptok_out,  // this cell's token flop
  output logic         ptgl,      // put toggle (flips on every put into this cell)
  output logic         reg_valid, // stored valid bit
  output logic [W-1:0] reg_data   // stored data item
);
  logic do_put;
  assign do_put = en_put & ptok_in;

  always_ff @(posedge clk_put or negedge rst_n) begin
    if (!rst_n) begin
      ptok_out  <= INIT_TOKEN;
      ptgl      <= 1'b0;
      reg_valid <= 1'b0;
      reg_data  <= '0;
    end else begin
      if (en_put) ptok_out <= ptok_in;
      if (do_put) begin
        ptgl      <= ~ptgl;
        reg_valid <= req_put;
        reg_data  <= data_put;
      end
    end
  end
endmodule
