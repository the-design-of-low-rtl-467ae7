// tb_full_detector: self-checking testbench of full_detector (4 cells).
//
// Drives every one of the 16 empty-flag patterns and checks full against
// an independent reference: full exactly when the pattern has fewer than two
// empty cells next to each other around the ring.  full must appear one
// clk_put cycle after the pattern is sampled (the latch-pair lag), and
// reset must clear it.
`timescale 1ns/1ps
module tb_full_detector;
  localparam int unsigned N = 4;
  logic clk_put = 0, rst_n = 1;
  initial #1ns rst_n = 0;
  logic [N-1:0] e = '1;
  logic full;
  always #5ns clk_put = ~clk_put;

  full_detector #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic bit ref_full(input logic [N-1:0] v);
    int adj = 0;
    for (int i = 0; i < N; i++) if (v[i] && v[(i+1)%N]) adj++;
    return adj == 0;
  endfunction

  initial begin
    e = 4'b0000;
    #2ns check(full == 0, "full low in reset");
    #10ns rst_n = 1;
    for (int p = 0; p < 16; p++) begin
      @(negedge clk_put); e = 4'(p);
      @(negedge clk_put);  // sampled at the rising edge in between
      check(full == ref_full(e), $sformatf("pattern %b: full=%b", e, full));
    end
    // lag: switch from not full to full, check it is not seen before the edge
    @(negedge clk_put); e = 4'b1111;
    @(negedge clk_put); check(full == 0, "empty ring not full");
    e = 4'b0001;  // one empty cell -> full
    #1ns check(full == 0, "full not visible before the next edge");
    @(posedge clk_put); #1ns check(full == 1, "full right after the sampling edge");
    e = 4'b1010;  // two empty cells, not adjacent: impossible in a ring FIFO, counts as full
    @(posedge clk_put); #1ns check(full == 1, "non-adjacent empties count as full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
