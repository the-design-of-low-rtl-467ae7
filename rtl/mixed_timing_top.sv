// mixed_timing_top: the complete family of mixed-timing interfaces, side by
// side, each with its own ports.
//
//   mcf_*  mixed_clock_fifo  - synchronous put (mcf_clk_put), synchronous get
//                              (mcf_clk_get)
//   aaf_*  async_async_fifo  - 4-phase put channel, 4-phase get channel
//   asf_*  async_sync_fifo   - 4-phase put channel, synchronous get
//   saf_*  sync_async_fifo   - synchronous put, 4-phase get channel
//   lis_*  a latency-insensitive channel crossing clock domains: two relay
//          stations on lis_clk1, the mixed-clock relay station from
//          lis_clk1 to lis_clk2, and one relay station on lis_clk2
//          (sender -> RS -> RS -> MCRS -> RS -> receiver).
//   asr_*  async_sync_rs     - 4-phase put channel, relay-station output
//                              on asr_clk_get
//   sar_*  sync_async_rs     - relay-station input on sar_clk_put, 4-phase
//                              get channel
//
// All share one asynchronous active-low reset.  CELLS and W apply to every
// FIFO and to the relay station; their defaults are the 4-cell, 8-bit
// configuration.  The interfaces' protocols and timing are described in the
// individual modules.  The five interfaces with an asynchronous side contain
// behavioural models of the self-timed cell halves; everything else is
// synthesizable.
`timescale 1ns/1ps
module mixed_timing_top #(
  parameter int unsigned CELLS = mtf_pkg::DEF_CELLS,
  parameter int unsigned W     = mtf_pkg::DEF_WIDTH
) (
  input  logic         rst_n,
  // mixed-clock FIFO
  input  logic         mcf_clk_put,
  input  logic         mcf_req_put,
  input  logic [W-1:0] mcf_data_put,
  output logic         mcf_full,
  input  logic         mcf_clk_get,
  input  logic         mcf_req_get,
  output logic         mcf_valid_get,
  output logic         mcf_empty,
  output logic [W-1:0] mcf_data_get,
  // async-async FIFO
  input  logic         aaf_put_req,
  input  logic [W-1:0] aaf_put_data,
  output logic         aaf_put_ack,
  input  logic         aaf_get_req,
  output logic         aaf_get_ack,
  output logic [W-1:0] aaf_get_data,
  // async-sync FIFO
  input  logic         asf_put_req,
  input  logic [W-1:0] asf_put_data,
  output logic         asf_put_ack,
  input  logic         asf_clk_get,
  input  logic         asf_req_get,
  output logic         asf_valid_get,
  output logic         asf_empty,
  output logic [W-1:0] asf_data_get,
  // sync-async FIFO
  input  logic         saf_clk_put,
  input  logic         saf_req_put,
  input  logic [W-1:0] saf_data_put,
  output logic         saf_full,
  input  logic         saf_get_req,
  output logic         saf_get_ack,
  output logic [W-1:0] saf_get_data,
  // relay-station channel across two clock domains
  input  logic         lis_clk1,
  input  logic         lis_valid_in,
  input  logic [W-1:0] lis_data_in,
  output logic         lis_stop_out,
  input  logic         lis_clk2,
  output logic         lis_valid_out,
  output logic [W-1:0] lis_data_out,
  input  logic         lis_stop_in,
  // async-sync relay station
  input  logic         asr_put_req,
  input  logic [W-1:0] asr_put_data,
  output logic         asr_put_ack,
  input  logic         asr_clk_get,
  output logic         asr_valid_out,
  output logic [W-1:0] asr_data_out,
  input  logic         asr_stop_in,
  // sync-async relay station
  input  logic         sar_clk_put,
  input  logic         sar_valid_in,
  input  logic [W-1:0] sar_data_in,
  output logic         sar_stop_out,
  input  logic         sar_get_req,
  output logic         sar_get_ack,
  output logic [W-1:0] sar_get_data
);
  mixed_clock_fifo #(.CELLS(CELLS), .W(W)) u_mcf (
    .rst_n,
    .clk_put(mcf_clk_put), .req_put(mcf_req_put), .data_put(mcf_data_put), .full(mcf_full),
    .clk_get(mcf_clk_get), .req_get(mcf_req_get), .valid_get(mcf_valid_get),
    .empty(mcf_empty), .data_get(mcf_data_get)
  );

  async_async_fifo #(.CELLS(CELLS), .W(W)) u_aaf (
    .rst_n,
    .put_req(aaf_put_req), .put_data(aaf_put_data), .put_ack(aaf_put_ack),
    .get_req(aaf_get_req), .get_ack(aaf_get_ack), .get_data(aaf_get_data)
  );

  async_sync_fifo #(.CELLS(CELLS), .W(W)) u_asf (
    .rst_n,
    .put_req(asf_put_req), .put_data(asf_put_data), .put_ack(asf_put_ack),
    .clk_get(asf_clk_get), .req_get(asf_req_get), .valid_get(asf_valid_get),
    .empty(asf_empty), .data_get(asf_data_get)
  );

  sync_async_fifo #(.CELLS(CELLS), .W(W)) u_saf (
    .rst_n,
    .clk_put(saf_clk_put), .req_put(saf_req_put), .data_put(saf_data_put), .full(saf_full),
    .get_req(saf_get_req), .get_ack(saf_get_ack), .get_data(saf_get_data)
  );

  // Relay-station channel: stage k drives stage k+1; stop flows backwards.
  logic         v1, v2, v3, s1, s2, s3;
  logic [W-1:0] d1, d2, d3;

  relay_station #(.W(W)) u_rs1 (
    .clk(lis_clk1), .rst_n, .valid_in(lis_valid_in), .data_in(lis_data_in),
    .stop_out(lis_stop_out), .valid_out(v1), .data_out(d1), .stop_in(s1)
  );
  relay_station #(.W(W)) u_rs2 (
    .clk(lis_clk1), .rst_n, .valid_in(v1), .data_in(d1),
    .stop_out(s1), .valid_out(v2), .data_out(d2), .stop_in(s2)
  );
  mixed_clock_rs #(.CELLS(CELLS), .W(W)) u_mcrs (
    .rst_n,
    .clk_put(lis_clk1), .valid_in(v2), .data_in(d2), .stop_out(s2),
    .clk_get(lis_clk2), .valid_out(v3), .data_out(d3), .stop_in(s3)
  );
  relay_station #(.W(W)) u_rs3 (
    .clk(lis_clk2), .rst_n, .valid_in(v3), .data_in(d3),
    .stop_out(s3), .valid_out(lis_valid_out), .data_out(lis_data_out), .stop_in(lis_stop_in)
  );

  async_sync_rs #(.CELLS(CELLS), .W(W)) u_asr (
    .rst_n,
    .put_req(asr_put_req), .put_data(asr_put_data), .put_ack(asr_put_ack),
    .clk_get(asr_clk_get), .valid_out(asr_valid_out), .data_out(asr_data_out),
    .stop_in(asr_stop_in)
  );

  sync_async_rs #(.CELLS(CELLS), .W(W)) u_sar (
    .rst_n,
    .clk_put(sar_clk_put), .valid_in(sar_valid_in), .data_in(sar_data_in),
    .stop_out(sar_stop_out),
    .get_req(sar_get_req), .get_ack(sar_get_ack), .get_data(sar_get_data)
  );
endmodule
