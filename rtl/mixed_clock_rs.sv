// mixed_clock_rs: mixed-clock relay station (MCRS), the link between two
// chains of relay stations that run on different clocks.
//
// It is the mixed-clock FIFO with only its put and get controllers changed:
// the same ring of mc_cell cells, full_detector and empty_detector.  Towards
// the sender it behaves like a relay station: it takes a packet every
// clk_put cycle, stores only the valid ones, and answers with stop_out (the
// synchronised full signal) instead of stalling a request.  Towards the
// receiver it also behaves like a relay station: every clk_get cycle it
// presents a packet, valid when an item is dequeued, invalid otherwise, and
// it obeys stop_in from the downstream station.
//
// Interface: packet_in is taken at a clk_put edge when valid_in is high and
// stop_out is low.  packet_out is valid in a clk_get cycle with valid_out
// high and counts as taken at the closing edge (stop_in is low then by
// construction).  rst_n is asynchronous and active low.
`timescale 1ns/1ps
module mixed_clock_rs #(
  parameter int unsigned CELLS = mtf_pkg::DEF_CELLS,
  parameter int unsigned W     = mtf_pkg::DEF_WIDTH
) (
  input  logic         rst_n,
  // relay-station side on clk_put
  input  logic         clk_put,
  input  logic         valid_in,
  input  logic [W-1:0] data_in,
  output logic         stop_out,
  // relay-station side on clk_get
  input  logic         clk_get,
  output logic         valid_out,
  output logic [W-1:0] data_out,
  input  logic         stop_in
);
  logic             en_put, en_get, full;
  logic [CELLS-1:0] ptok, gtok, f, e, cell_valid;
  logic [W-1:0]     cell_data [CELLS];
  logic             ne, te, bus_valid;

  mcrs_put_controller u_put_ctrl (.valid_in, .full, .en_put, .stop_out);

  full_detector #(.N(CELLS)) u_full (.clk_put, .rst_n, .e, .full);

  empty_detector #(.N(CELLS)) u_empty (.clk_get, .rst_n, .f, .ne, .te);

  mcrs_get_controller u_get_ctrl (
    .clk_get, .rst_n, .stop_in, .ne, .te, .bus_valid, .en_get, .valid_out
  );

  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    localparam int unsigned NXT = mtf_pkg::ring_next(i, CELLS);
    mc_cell #(.W(W), .INIT_PTOK(i == 1), .INIT_GTOK(i == 1)) u_cell (
      .clk_put, .clk_get, .rst_n,
      .en_put, .req_put(valid_in), .data_put(data_in), .ptok_in(ptok[NXT]), .ptok_out(ptok[i]),
      .en_get, .gtok_in(gtok[NXT]), .gtok_out(gtok[i]),
      .valid(cell_valid[i]), .data_get(cell_data[i]),
      .f_i(f[i]), .e_i(e[i])
    );
  end

  always_comb begin
    data_out = '0;
    for (int unsigned i = 0; i < CELLS; i++) data_out |= cell_data[i];
  end
  assign bus_valid = |cell_valid;

  a_no_overflow:  assert property (@(posedge clk_put) disable iff (!rst_n)
                                   en_put |-> |(e & {ptok[0], ptok[CELLS-1:1]}));
  a_no_underflow: assert property (@(posedge clk_get) disable iff (!rst_n)
                                   en_get |-> |(f & {gtok[0], gtok[CELLS-1:1]}));
endmodule
