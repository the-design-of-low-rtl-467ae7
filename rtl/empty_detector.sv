// empty_detector: the two empty conditions of the get side.
//
// ne ("new empty") is the synchronised, conservative condition: fewer than
// two full cells, detected as "no two neighbouring cells are both full"
// (NOT(f0&f1 | f1&f2 | f2&f3 | f3&f0) for 4 cells), passed through a
// two-latch (master-slave) synchroniser on CLK_get.  te ("true empty": no full cell at all)
// is handed to the get controller unsynchronised; the get controller samples
// it in its oe register.  Combining the two is the get controller's job (the
// bi-modal empty detector).
//
// Timing: ne is the state sampled at the last rising CLK_get edge (one
// cycle old when used); te is combinational.  STAGES is the number of
// latches.  Reset value of ne: 1.
`timescale 1ns/1ps
module empty_detector #(
  parameter int unsigned N      = mtf_pkg::DEF_CELLS,
  parameter int unsigned STAGES = mtf_pkg::SYNC_STAGES
) (
  input  logic         clk_get,
  input  logic         rst_n,
  input  logic [N-1:0] f,      // per-cell full flags
  output logic         ne,     // new empty: 0 or 1 full cells (synchronised)
  output logic         te      // true empty: no full cell (combinational)
);
  logic [N-1:0] pair_full;
  logic         ne_raw;

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      pair_full[i] = f[i] & f[mtf_pkg::ring_next(i, N)];
  end
  assign ne_raw = ~|pair_full;
  assign te     = ~|f;

  sync_latch #(.LATCHES(STAGES), .RST_VAL(1'b1)) u_sync (
    .clk(clk_get), .rst_n, .d(ne_raw), .q(ne)
  );
endmodule
