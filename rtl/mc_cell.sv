// mc_cell: one cell of the mixed-clock (synchronous put, synchronous get)
// FIFO.
//
// A cell has a put half clocked by CLK_put and a get half clocked by CLK_get
// around one data register.  The put half writes the register when the cell
// holds the put token and en_put is high, and passes the put token on at the
// same edge.  The get half broadcasts the register on the get bus when the
// cell holds the get token and en_get is high, and passes the get token on
// at the closing CLK_get edge.  The cell reports its state to the detectors:
// f_i (full) and e_i (empty).
//
// The token flops, the register and the two token-gated operations follow
// the cell drawing.  Here the cell's state is the difference of a put toggle
// and a get toggle, each flipped only in its own clock domain, instead of a
// set-reset latch; the get bus is an AND-OR bus instead of tri-state
// drivers.  Both are choices of this design.
`timescale 1ns/1ps
module mc_cell #(
  parameter int unsigned W        = mtf_pkg::DEF_WIDTH,
  parameter bit          INIT_PTOK = 1'b0,
  parameter bit          INIT_GTOK = 1'b0
) (
  input  logic         clk_put,
  input  logic         clk_get,
  input  logic         rst_n,
  // put side
  input  logic         en_put,
  input  logic         req_put,
  input  logic [W-1:0] data_put,
  input  logic         ptok_in,
  output logic         ptok_out,
  // get side
  input  logic         en_get,
  input  logic         gtok_in,
  output logic         gtok_out,
  output logic         valid,     // get bus share: stored valid bit during a get
  output logic [W-1:0] data_get,  // get bus share: stored data during a get
  // state
  output logic         f_i,
  output logic         e_i
);
  logic         ptgl, gtgl;
  logic         reg_valid;
  logic [W-1:0] reg_data;

  put_part_sync #(.W(W), .INIT_TOKEN(INIT_PTOK)) u_put (
    .clk_put, .rst_n, .en_put, .req_put, .data_put, .ptok_in, .ptok_out,
    .ptgl, .reg_valid, .reg_data
  );

  get_part_sync #(.W(W), .INIT_TOKEN(INIT_GTOK)) u_get (
    .clk_get, .rst_n, .en_get, .gtok_in, .gtok_out, .gtgl,
    .reg_valid, .reg_data, .bus_valid(valid), .bus_data(data_get)
  );

  assign f_i = ptgl ^ gtgl;
  assign e_i = ~f_i;
endmodule
