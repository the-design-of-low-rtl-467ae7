// sync_latch: synchroniser for one control bit, made of LATCHES latches.
//
// The full and new-empty detectors are synchronised with two latches on the
// receiving clock, forming a master-slave pair: the input is sampled at the
// rising clk edge and held for the following cycle.  Each such pair is
// written here as one edge-triggered register (LATCHES/2 registers in
// series), which behaves the same and keeps simulation free of the race a
// latch opening on the clock edge would have.  With the default two latches
// the controller acts on a value one clock cycle old; the full and empty
// definitions (a margin of one cell) are sized for exactly that lag, so a
// deeper chain needs wider detector margins.  Asynchronous active-low reset
// to RST_VAL.  LATCHES must be even and at least 2.
`timescale 1ns/1ps
module sync_latch #(
  parameter int unsigned LATCHES = mtf_pkg::SYNC_STAGES,
  parameter bit          RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  localparam int unsigned PAIRS = LATCHES / 2;
  logic [PAIRS-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= {PAIRS{RST_VAL}};
    else        chain <= (chain << 1) | PAIRS'(d);
  end

  assign q = chain[PAIRS-1];
endmodule
