// get_part_sync: the synchronous get half of one FIFO cell.
//
// The cell holding the get token (gtok_in high) is the head of the queue.
// While en_get is high in a CLK_get cycle it places its stored valid bit and
// data on the common get bus (bus_valid/bus_data are zero otherwise, so the
// FIFO forms the bus as an OR of all cells instead of tri-state drivers).
// At the next CLK_get edge it records the get by flipping its get toggle
// (emptying the cell) and the token moves one cell along the ring.
//
// Timing: data is on the bus combinationally in the cycle of the get and is
// taken by the receiver at the closing edge; one get per CLK_get cycle.
`timescale 1ns/1ps
module get_part_sync #(
  parameter int unsigned W          = mtf_pkg::DEF_WIDTH,
  parameter bit          INIT_TOKEN = 1'b0
) (
  input  logic         clk_get,
  input  logic         rst_n,
  input  logic         en_get,    // global get enable from the get controller
  input  logic         gtok_in,   // token offered by the ring neighbour
  output logic         gtok_out,  // this cell's token flop
  output logic         gtgl,      // get toggle (flips on every get from this cell)
  input  logic         reg_valid,
  input  logic [W-1:0] reg_data,
  output logic         bus_valid, // this cell's share of the get bus
  output logic [W-1:0] bus_data
);
  logic do_get;
  assign do_get    = en_get & gtok_in;
  assign bus_valid = do_get & reg_valid;
  assign bus_data  = do_get ? reg_data : '0;

  always_ff @(posedge clk_get or negedge rst_n) begin
    if (!rst_n) begin
      gtok_out <= INIT_TOKEN;
      gtgl     <= 1'b0;
    end else begin
      if (en_get) gtok_out <= gtok_in;
      if (do_get) gtgl <= ~gtgl;
    end
  end
endmodule
