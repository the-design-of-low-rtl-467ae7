// mtf_pkg: constants shared by the mixed-timing FIFO family.
//
// The default capacity of 4 cells and the 8-bit data items are the sizes the
// FIFOs were characterised at (a 16-cell variant was also measured; set
// CELLS=16 on any FIFO to get it).  SYNC_STAGES is the depth of the
// synchronisers on the full and new-empty signals: two latches each.  The
// asynchronous-part handshake delay is a modelling choice of this design.
`timescale 1ns/1ps
package mtf_pkg;
  parameter int unsigned DEF_CELLS   = 4;   // FIFO capacity in cells
  parameter int unsigned DEF_WIDTH   = 8;   // data item width in bits
  parameter int unsigned SYNC_STAGES = 2;   // synchronising latches per detector
  parameter int unsigned ASYNC_DLY_PS = 200; // behavioural delay of one async handshake step

  // Ring neighbour that hands the token on to cell i (tokens move from the
  // higher index to the lower one, wrapping around).
  function automatic int unsigned ring_next(int unsigned i, int unsigned n);
    return (i + 1) % n;
  endfunction
endpackage
