// sync_async_fifo: FIFO from a synchronous sender to an asynchronous
// receiver.  This is a behavioural model, because its get half is the
// behavioural get_part_async; its put half is synthesizable.
//
// It is the mirror image of async_sync_fifo, assembled from the same parts:
// the put interface is exactly that of mixed_clock_fifo (put token ring,
// full_detector synchronised on clk_put, put_controller, common put bus),
// and the get interface is the asynchronous 4-phase bundled-data get channel
// of async_async_fifo (the head cell withholds get_ack while it is empty, no
// empty detector).
//
// Interface and timing: put side as in mixed_clock_fifo, get side as in
// async_async_fifo.  rst_n is active low; get_req must be low during reset.
`timescale 1ns/1ps
module sync_async_fifo #(
  parameter int unsigned CELLS  = mtf_pkg::DEF_CELLS,
  parameter int unsigned W      = mtf_pkg::DEF_WIDTH,
  parameter int unsigned DLY_PS = mtf_pkg::ASYNC_DLY_PS
) (
  input  logic         rst_n,
  // synchronous put interface
  input  logic         clk_put,
  input  logic         req_put,
  input  logic [W-1:0] data_put,
  output logic         full,
  // asynchronous get channel
  input  logic         get_req,
  output logic         get_ack,
  output logic [W-1:0] get_data
);
  logic [CELLS-1:0] ptok, gtok, ptgl, gtgl, f, e, gack, reg_valid;
  logic [W-1:0]     reg_data [CELLS];
  logic [W-1:0]     bus_data [CELLS];
  logic             en_put;

  put_controller u_put_ctrl (.req_put, .full, .en_put);

  full_detector #(.N(CELLS)) u_full (.clk_put, .rst_n, .e, .full);

  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    localparam int unsigned NXT = mtf_pkg::ring_next(i, CELLS);
    put_part_sync #(.W(W), .INIT_TOKEN(i == 1)) u_put (
      .clk_put, .rst_n, .en_put, .req_put, .data_put, .ptok_in(ptok[NXT]), .ptok_out(ptok[i]),
      .ptgl(ptgl[i]), .reg_valid(reg_valid[i]), .reg_data(reg_data[i])
    );
    get_part_async #(.W(W), .INIT_TOKEN(i == 1), .DLY_PS(DLY_PS)) u_get (
      .rst_n, .get_req, .get_ack, .gtok_in(gtok[NXT]), .gtok_out(gtok[i]),
      .f_i(f[i]), .reg_data(reg_data[i]), .ack_o(gack[i]), .gtgl(gtgl[i]),
      .bus_data(bus_data[i])
    );
  end

  assign f       = ptgl ^ gtgl;
  assign e       = ~f;
  assign get_ack = |gack;

  always_comb begin
    get_data = '0;
    for (int unsigned i = 0; i < CELLS; i++) get_data |= bus_data[i];
  end
endmodule
