// get_part_async: behavioural model of the asynchronous get half of a FIFO
// cell (4-phase bundled-data get channel).  This is a behavioural model, not
// synthesizable logic.
//
// Protocol: the receiver raises get_req; the FIFO puts the head item on
// get_data and raises get_ack; the receiver takes the data and lowers
// get_req; the FIFO lowers get_ack.  The cell addressed by the get token
// (gtok_in high) waits until get_req is high and it is full (f_i), drives
// the get bus and, after DLY, raises its ack; an empty FIFO simply withholds
// get_ack.  When get_req falls the cell releases the bus, marks itself empty
// by flipping its get toggle and drops its ack after DLY; the token flops
// move the token on at that falling edge of get_req, qualified by get_ack.
//
// The channel type, withheld acknowledgment and token ring follow the
// design; the exact controller and the delay value are choices of this model.
`timescale 1ns/1ps
module get_part_async #(
  parameter int unsigned W          = mtf_pkg::DEF_WIDTH,
  parameter bit          INIT_TOKEN = 1'b0,
  parameter int unsigned DLY_PS     = mtf_pkg::ASYNC_DLY_PS
) (
  input  logic         rst_n,
  input  logic         get_req,
  input  logic         get_ack,    // global acknowledgment (OR of all cells)
  input  logic         gtok_in,
  output logic         gtok_out,
  input  logic         f_i,        // this cell is full
  input  logic [W-1:0] reg_data,
  output logic         ack_o,      // this cell's share of get_ack
  output logic         gtgl,       // get toggle
  output logic [W-1:0] bus_data    // this cell's share of the get bus
);
  logic drive;

  always @(negedge get_req or negedge rst_n) begin
    if (!rst_n)       gtok_out <= INIT_TOKEN;
    else if (get_ack) gtok_out <= gtok_in;
  end

  always begin
    ack_o = 1'b0;
    gtgl  = 1'b0;
    drive = 1'b0;
    wait (rst_n);
    while (rst_n) begin
      wait (!rst_n || (get_req && gtok_in && f_i));
      if (rst_n) begin
        drive = 1'b1;
        #(DLY_PS * 1ps) ack_o = 1'b1;
        wait (!get_req || !rst_n);
        drive = 1'b0;
        gtgl  = ~gtgl;
        #(DLY_PS * 1ps) ack_o = 1'b0;
      end
    end
  end

  assign bus_data = drive ? reg_data : '0;
endmodule
