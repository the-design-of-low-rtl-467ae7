// async_async_fifo: FIFO between two asynchronous (clockless) domains.  This
// is a behavioural model: its cells are built from the behavioural
// put_part_async and get_part_async models.
//
// Both interfaces are 4-phase bundled-data channels (put_req/put_ack with
// put_data, get_req/get_ack with get_data).  The FIFO is the same token ring
// as the mixed-clock FIFO: a put token marks the tail, a get token the head,
// and items stay in the cell they were written to.  There are no full or
// empty detectors and no external controllers: when the FIFO is full the
// tail cell withholds put_ack until its item has been taken; when it is
// empty the head cell withholds get_ack until an item arrives.  Each cell's
// state is the difference of its put and get toggles, as in mc_cell.
//
// Timing: each handshake edge of the FIFO follows the triggering request
// edge by DLY_PS (model delay).  rst_n (active low) empties the ring and
// places both tokens at cell 0; the requests must be low during reset.
`timescale 1ns/1ps
module async_async_fifo #(
  parameter int unsigned CELLS  = mtf_pkg::DEF_CELLS,
  parameter int unsigned W      = mtf_pkg::DEF_WIDTH,
  parameter int unsigned DLY_PS = mtf_pkg::ASYNC_DLY_PS
) (
  input  logic         rst_n,
  // asynchronous put channel
  input  logic         put_req,
  input  logic [W-1:0] put_data,
  output logic         put_ack,
  // asynchronous get channel
  input  logic         get_req,
  output logic         get_ack,
  output logic [W-1:0] get_data
);
  logic [CELLS-1:0] ptok, gtok, ptgl, gtgl, f, e, pack, gack;
  logic [W-1:0]     reg_data [CELLS];
  logic [W-1:0]     bus_data [CELLS];

  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    localparam int unsigned NXT = mtf_pkg::ring_next(i, CELLS);
    put_part_async #(.W(W), .INIT_TOKEN(i == 1), .DLY_PS(DLY_PS)) u_put (
      .rst_n, .put_req, .put_data, .put_ack, .ptok_in(ptok[NXT]), .ptok_out(ptok[i]),
      .e_i(e[i]), .ack_o(pack[i]), .ptgl(ptgl[i]), .reg_data(reg_data[i])
    );
    get_part_async #(.W(W), .INIT_TOKEN(i == 1), .DLY_PS(DLY_PS)) u_get (
      .rst_n, .get_req, .get_ack, .gtok_in(gtok[NXT]), .gtok_out(gtok[i]),
      .f_i(f[i]), .reg_data(reg_data[i]), .ack_o(gack[i]), .gtgl(gtgl[i]),
      .bus_data(bus_data[i])
    );
  end

  assign f       = ptgl ^ gtgl;
  assign e       = ~f;
  assign put_ack = |pack;
  assign get_ack = |gack;

  always_comb begin
    get_data = '0;
    for (int unsigned i = 0; i < CELLS; i++) get_data |= bus_data[i];
  end
endmodule
