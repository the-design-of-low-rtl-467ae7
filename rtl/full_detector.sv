// full_detector: the put side's full signal.
//
// Because the full signal passes through a two-latch synchroniser on
// CLK_put, it is a cycle old when the put controller sees it.  To stay
// safe it uses a conservative definition: the FIFO counts as full when fewer
// than two empty cells are left, detected as "no two neighbouring cells are
// both empty" (the occupied cells always form one contiguous run of the
// ring).  For 4 cells that is NOT(e0&e1 | e1&e2 | e2&e3 | e3&e0), the pairs
// of the detector drawing.  The raw value is built with ordinary
// combinational logic (the original uses a precharged wired-OR) and then
// passed through two synchronising latches (a master-slave pair).
//
// Timing: the raw value is sampled at each rising CLK_put edge and drives
// full for the following cycle, so the put controller acts on a state one
// cycle old; at most two more puts can then land, and the two-cell margin
// absorbs them.  STAGES is the number of latches.
// Reset value 0 (the FIFO starts empty).
`timescale 1ns/1ps
module full_detector #(
  parameter int unsigned N      = mtf_pkg::DEF_CELLS,
  parameter int unsigned STAGES = mtf_pkg::SYNC_STAGES
) (
  input  logic         clk_put,
  input  logic         rst_n,
  input  logic [N-1:0] e,      // per-cell empty flags
  output logic         full
);
  logic [N-1:0] pair_empty;
  logic         full_raw;

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      pair_empty[i] = e[i] & e[mtf_pkg::ring_next(i, N)];
  end
  assign full_raw = ~|pair_empty;

  sync_latch #(.LATCHES(STAGES), .RST_VAL(1'b0)) u_sync (
    .clk(clk_put), .rst_n, .d(full_raw), .q(full)
  );
endmodule
