// relay_station: single-clock relay station for a latency-insensitive
// channel that has been broken into one-cycle segments.
//
// Every cycle a packet (valid bit + data) is latched into the main register
// MR and presented downstream by the end of the cycle; invalid packets flow
// like valid ones, so in steady state data moves on every cycle.  Back
// pressure: stop_out is stop_in delayed by one register.  When the station
// is stopped from the right (stop_in = 1), it keeps MR on its output and
// latches the one packet that still arrives, because the upstream station
// has not yet seen stop_out, into the auxiliary register AR; stop_out then
// rises.  When stop_in falls, MR is sent first, then AR, and normal
// operation resumes with stop_out = 0.
//
// A packet on packet_out counts as taken at a clk edge where stop_in is low.
// A packet on packet_in is taken at every edge where stop_out is low.
// rst_n (asynchronous, active low) clears both registers to invalid packets
// and stop_out to 0.  MR, AR, the switch, the output mux and the registered
// stop follow the relay-station description; the control encoding is this
// design's.
`timescale 1ns/1ps
module relay_station #(
  parameter int unsigned W = mtf_pkg::DEF_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_in,
  input  logic [W-1:0] data_in,
  output logic         stop_out,
  output logic         valid_out,
  output logic [W-1:0] data_out,
  input  logic         stop_in
);
  logic         mr_valid, ar_valid;
  logic [W-1:0] mr_data,  ar_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mr_valid <= 1'b0;
      mr_data  <= '0;
      ar_valid <= 1'b0;
      ar_data  <= '0;
      stop_out <= 1'b0;
    end else begin
      stop_out <= stop_in;
      if (!stop_out) begin
        // running: the incoming packet is accepted
        if (!stop_in) begin
          mr_valid <= valid_in;          // switch routes input to MR
          mr_data  <= data_in;
        end else begin
          ar_valid <= valid_in;          // switch routes input to AR
          ar_data  <= data_in;
        end
      end else if (!stop_in) begin
        // restarting: MR was taken this edge, AR moves up behind it
        mr_valid <= ar_valid;
        mr_data  <= ar_data;
      end
    end
  end

  assign valid_out = mr_valid;
  assign data_out  = mr_data;
endmodule
