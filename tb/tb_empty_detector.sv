// tb_empty_detector: self-checking testbench of empty_detector (4 cells).
//
// Drives every one of the 16 full-flag patterns and checks ne (fewer than
// two neighbouring full cells, one get cycle late) and te (no full cell,
// immediately) against independent references; reset must set ne.
`timescale 1ns/1ps
module tb_empty_detector;
  localparam int unsigned N = 4;
  logic clk_get = 0, rst_n = 1;
  initial #1ns rst_n = 0;
  logic [N-1:0] f = '1;
  logic ne, te;
  always #7ns clk_get = ~clk_get;

  empty_detector #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  function automatic bit ref_ne(input logic [N-1:0] v);
    for (int i = 0; i < N; i++) if (v[i] && v[(i+1)%N]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #2ns check(ne == 1, "ne set in reset");
    #10ns rst_n = 1;
    for (int p = 0; p < 16; p++) begin
      @(negedge clk_get); f = 4'(p);
      #1ns check(te == (p == 0), $sformatf("pattern %b: te=%b", f, te));
      @(negedge clk_get);
      check(ne == ref_ne(f), $sformatf("pattern %b: ne=%b", f, ne));
    end
    @(negedge clk_get); f = 4'b0000;
    @(negedge clk_get); f = 4'b0110;
    #1ns check(ne == 1, "ne not changed before the edge");
    @(posedge clk_get); #1ns check(ne == 0, "ne falls right after the sampling edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
