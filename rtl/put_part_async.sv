// put_part_async: behavioural model of the asynchronous put half of a FIFO
// cell (4-phase bundled-data put channel).  This is a behavioural model, not
// synthesizable logic: it describes the self-timed cell controller with
// event controls and delays.
//
// Protocol: the sender sets put_data, then raises put_req; the FIFO raises
// put_ack once the item is stored; the sender lowers put_req, and the FIFO
// lowers put_ack.  The cell addressed by the put token (ptok_in high) waits
// until put_req is high and it is empty (e_i), then latches the data, marks
// itself full by flipping its put toggle and, after DLY, raises its ack.  If
// the cell is still full the acknowledgment is simply withheld until the get
// side empties it; no detector or external controller is needed.  When
// put_req falls while put_ack (the OR of all cells' acks) is high, every
// token flop takes its ptok_in, so the token moves on; DLY later the cell
// drops its ack.
//
// The 4-phase bundled-data channel, the withheld acknowledgment and the
// token ring follow the design; the exact controller and the delay value are
// choices of this model.
`timescale 1ns/1ps
module put_part_async #(
  parameter int unsigned W          = mtf_pkg::DEF_WIDTH,
  parameter bit          INIT_TOKEN = 1'b0,
  parameter int unsigned DLY_PS     = mtf_pkg::ASYNC_DLY_PS
) (
  input  logic         rst_n,
  input  logic         put_req,
  input  logic [W-1:0] put_data,
  input  logic         put_ack,    // global acknowledgment (OR of all cells)
  input  logic         ptok_in,
  output logic         ptok_out,
  input  logic         e_i,        // this cell is empty
  output logic         ack_o,      // this cell's share of put_ack
  output logic         ptgl,       // put toggle
  output logic [W-1:0] reg_data
);
  always @(negedge put_req or negedge rst_n) begin
    if (!rst_n)       ptok_out <= INIT_TOKEN;
    else if (put_ack) ptok_out <= ptok_in;
  end

  always begin
    ack_o    = 1'b0;
    ptgl     = 1'b0;
    reg_data = '0;
    wait (rst_n);
    while (rst_n) begin
      wait (!rst_n || (put_req && ptok_in && e_i));
      if (rst_n) begin
        reg_data = put_data;
        ptgl     = ~ptgl;
        #(DLY_PS * 1ps) ack_o = 1'b1;
        wait (!put_req || !rst_n);
        #(DLY_PS * 1ps) ack_o = 1'b0;
      end
    end
  end
endmodule
