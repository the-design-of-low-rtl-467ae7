// mixed_clock_fifo: FIFO between two independent clock domains (synchronous
// put interface on clk_put, synchronous get interface on clk_get).
//
// The FIFO is a ring of CELLS identical cells (mc_cell).  A put token
// circulates among the cells on the put side and marks the tail; a get token
// circulates on the get side and marks the head.  Data never moves between
// cells: a put writes straight into the tail cell from the common put bus, a
// get reads straight from the head cell onto the common get bus, so the
// latency through an empty FIFO is only that of the empty-side
// synchronisation.  Around the ring sit four controllers:
//   full_detector  - full when fewer than two cells are empty, synchronised
//                    by two latches on clk_put;
//   put_controller - en_put = req_put AND NOT full;
//   empty_detector - new empty (fewer than two full cells, two-latch
//                    synchronised on clk_get) and true empty (no full cell);
//   get_controller - bi-modal empty and en_get (see get_controller.sv).
// In steady state one item can be put per clk_put cycle and one taken per
// clk_get cycle; no synchroniser lies on the data path.
//
// Interface: the sender holds req_put/data_put and an item is taken at a
// clk_put edge when req_put is high and full is low.  The receiver raises
// req_get; in a clk_get cycle with valid_get high, data_get holds the item
// and it is removed at the closing edge.  rst_n is an asynchronous,
// active-low reset for both domains; after reset the ring is empty and both
// tokens mark cell 0.  Capacity: CELLS items.  full rises once fewer than two
// cells are empty and is seen one clk_put cycle late; the margin covers the
// puts made in the meantime.
`timescale 1ns/1ps
module mixed_clock_fifo #(
  parameter int unsigned CELLS = mtf_pkg::DEF_CELLS,
  parameter int unsigned W     = mtf_pkg::DEF_WIDTH
) (
  input  logic         rst_n,
  // synchronous put interface
  input  logic         clk_put,
  input  logic         req_put,
  input  logic [W-1:0] data_put,
  output logic         full,
  // synchronous get interface
  input  logic         clk_get,
  input  logic         req_get,
  output logic         valid_get,
  output logic         empty,
  output logic [W-1:0] data_get
);
  logic             en_put, en_get;
  logic [CELLS-1:0] ptok, gtok;          // token flop of each cell
  logic [CELLS-1:0] f, e;
  logic [CELLS-1:0] cell_valid;
  logic [W-1:0]     cell_data [CELLS];
  logic             ne, te, bus_valid;

  put_controller u_put_ctrl (.req_put, .full, .en_put);

  full_detector #(.N(CELLS)) u_full (.clk_put, .rst_n, .e, .full);

  empty_detector #(.N(CELLS)) u_empty (.clk_get, .rst_n, .f, .ne, .te);

  get_controller u_get_ctrl (
    .clk_get, .rst_n, .req_get, .ne, .te, .bus_valid, .en_get, .empty, .valid_get
  );

  // Cell i is served when the token flop of cell i+1 is set; the flops of
  // cell 1 start set, so cell 0 is the first tail and the first head.
  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    localparam int unsigned NXT = mtf_pkg::ring_next(i, CELLS);
    mc_cell #(.W(W), .INIT_PTOK(i == 1), .INIT_GTOK(i == 1)) u_cell (
      .clk_put, .clk_get, .rst_n,
      .en_put, .req_put, .data_put, .ptok_in(ptok[NXT]), .ptok_out(ptok[i]),
      .en_get, .gtok_in(gtok[NXT]), .gtok_out(gtok[i]),
      .valid(cell_valid[i]), .data_get(cell_data[i]),
      .f_i(f[i]), .e_i(e[i])
    );
  end

  // Common get bus: at most one cell drives a non-zero value.
  always_comb begin
    data_get = '0;
    for (int unsigned i = 0; i < CELLS; i++) data_get |= cell_data[i];
  end
  assign bus_valid = |cell_valid;

  // Exactly one put token and one get token circulate.
  a_put_token: assert property (@(posedge clk_put) disable iff (!rst_n) (ptok != '0) && ((ptok & (ptok - 1'b1)) == '0));
  a_get_token: assert property (@(posedge clk_get) disable iff (!rst_n) (gtok != '0) && ((gtok & (gtok - 1'b1)) == '0));
  // Never write into a full cell, never read an empty one.
  a_no_overflow:  assert property (@(posedge clk_put) disable iff (!rst_n)
                                   en_put |-> |(e & {ptok[0], ptok[CELLS-1:1]}));
  a_no_underflow: assert property (@(posedge clk_get) disable iff (!rst_n)
                                   en_get |-> |(f & {gtok[0], gtok[CELLS-1:1]}));
endmodule
