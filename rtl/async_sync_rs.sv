// async_sync_rs: relay station from an asynchronous sender to a synchronous
// relay-station chain.  This is a behavioural model, because its put half is
// the behavioural put_part_async; its get half is synthesizable.
//
// Like the mixed-clock relay station it is a FIFO with changed controllers,
// here only on the synchronous side: the put interface is exactly the
// asynchronous 4-phase bundled-data put channel of the async FIFOs (the tail
// cell withholds put_ack while it is full), and the get interface is that of
// mixed_clock_rs (mcrs_get_controller: a packet every clk_get cycle, valid
// when an item leaves, invalid otherwise, obeying stop_in).
//
// Interface and timing: put side as in async_async_fifo; get side as in
// mixed_clock_rs.  rst_n is active low; put_req must be low during reset.
//
// The original design names this interface and reports its speed, but does
// not detail it.  Building it by swapping the synchronous-side controller for
// the relay-station one, exactly as the mixed-clock relay station is derived
// from the mixed-clock FIFO, is this design's reading.
`timescale 1ns/1ps
module async_sync_rs #(
  parameter int unsigned CELLS  = mtf_pkg::DEF_CELLS,
  parameter int unsigned W      = mtf_pkg::DEF_WIDTH,
  parameter int unsigned DLY_PS = mtf_pkg::ASYNC_DLY_PS
) (
  input  logic         rst_n,
  // asynchronous put channel
  input  logic         put_req,
  input  logic [W-1:0] put_data,
  output logic         put_ack,
  // relay-station side on clk_get
  input  logic         clk_get,
  output logic         valid_out,
  output logic [W-1:0] data_out,
  input  logic         stop_in
);
  logic [CELLS-1:0] ptok, gtok, ptgl, gtgl, f, e, pack, cell_valid;
  logic [W-1:0]     reg_data [CELLS];
  logic [W-1:0]     bus_data [CELLS];
  logic             en_get, ne, te, bus_valid;

  empty_detector #(.N(CELLS)) u_empty (.clk_get, .rst_n, .f, .ne, .te);

  mcrs_get_controller u_get_ctrl (
    .clk_get, .rst_n, .stop_in, .ne, .te, .bus_valid, .en_get, .valid_out
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
    data_out = '0;
    for (int unsigned i = 0; i < CELLS; i++) data_out |= bus_data[i];
  end
endmodule
