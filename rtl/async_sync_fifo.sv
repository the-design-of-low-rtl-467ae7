// async_sync_fifo: FIFO from an asynchronous sender to a synchronous
// receiver.  This is a behavioural model, because its put half is the
// behavioural put_part_async; its get half is synthesizable.
//
// It is assembled from reusable parts: the put interface is exactly the
// asynchronous put interface of async_async_fifo (4-phase bundled data, the
// tail cell withholds put_ack while it is full, no full detector), and the
// get interface is exactly that of mixed_clock_fifo (get token ring,
// empty_detector with synchronised new-empty and true-empty, bi-modal
// get_controller, common get bus).  Each cell pairs an asynchronous put half
// with a synchronous get half around one data register.
//
// Interface and timing: put side as in async_async_fifo, get side as in
// mixed_clock_fifo (an item is delivered in a clk_get cycle with valid_get
// high and removed at the closing edge).  rst_n is active low.
`timescale 1ns/1ps
module async_sync_fifo #(
  parameter int unsigned CELLS  = mtf_pkg::DEF_CELLS,
  parameter int unsigned W      = mtf_pkg::DEF_WIDTH,
  parameter int unsigned DLY_PS = mtf_pkg::ASYNC_DLY_PS
) (
  input  logic         rst_n,
  // asynchronous put channel
  input  logic         put_req,
  input  logic [W-1:0] put_data,
  output logic         put_ack,
  // synchronous get interface
  input  logic         clk_get,
  input  logic         req_get,
  output logic         valid_get,
  output logic         empty,
  output logic [W-1:0] data_get
);
  logic [CELLS-1:0] ptok, gtok, ptgl, gtgl, f, e, pack, cell_valid;
  logic [W-1:0]     reg_data [CELLS];
  logic [W-1:0]     bus_data [CELLS];
  logic             en_get, ne, te, bus_valid;

  empty_detector #(.N(CELLS)) u_empty (.clk_get, .rst_n, .f, .ne, .te);

  get_controller u_get_ctrl (
    .clk_get, .rst_n, .req_get, .ne, .te, .bus_valid, .en_get, .empty, .valid_get
  );

  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    localparam int unsigned NXT = mtf_pkg::ring_next(i, CELLS);
    put_part_async #(.W(W), .INIT_TOKEN(i == 1), .DLY_PS(DLY_PS)) u_put (
      .rst_n, .put_req, .put_data, .put_ack, .ptok_in(ptok[NXT]), .ptok_out(ptok[i]),
      .e_i(e[i]), .ack_o(pack[i]), .ptgl(ptgl[i]), .reg_data(reg_data[i])
    );
    get_part_sync #(.W(W), .INIT_TOKEN(i == 1)) u_get (
      .clk_get, .rst_n, .en_get, .gtok_in(gtok[NXT]), .gtok_out(gtok[i]), .gtgl(gtgl[i]),
      .reg_valid(1'b1), .reg_data(reg_data[i]),
      .bus_valid(cell_valid[i]), .bus_data(bus_data[i])
    );
  end

  assign f         = ptgl ^ gtgl;
  assign e         = ~f;
  assign put_ack   = |pack;
  assign bus_valid = |cell_valid;

  always_comb begin
    data_get = '0;
    for (int unsigned i = 0; i < CELLS; i++) data_get |= bus_data[i];
  end
endmodule
