// tb_mc_cell: self-checking testbench of one mixed-clock FIFO cell.
//
// The cell's token inputs are driven directly.  Checks: a put without the
// token does nothing; a put with the token stores data and valid, sets f_i
// and moves the token flop; the get bus stays zero until a get with the get
// token, then carries the stored item in that cycle; the closing get edge
// empties the cell and moves the get token flop; en_get without the token
// leaves the cell full.  Clocks: put 10 ns, get 14 ns.
`timescale 1ns/1ps
module tb_mc_cell;
  localparam int unsigned W = 8;
  logic clk_put = 0, clk_get = 0, rst_n = 1;
  initial #1ns rst_n = 0;
  logic en_put = 0, req_put = 0, ptok_in = 0, en_get = 0, gtok_in = 0;
  logic [W-1:0] data_put = '0;
  logic ptok_out, gtok_out, valid, f_i, e_i;
  logic [W-1:0] data_get;

  always #5ns clk_put = ~clk_put;
  always #7ns clk_get = ~clk_get;

  mc_cell #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #12ns rst_n = 1;
    check(e_i && !f_i && !ptok_out && !gtok_out, "reset state");
    // put enabled but token elsewhere
    @(negedge clk_put); en_put = 1; req_put = 1; data_put = 8'hA5; ptok_in = 0;
    @(negedge clk_put); check(e_i, "no put without token");
    check(ptok_out == 1'b0, "token flop loads ptok_in (0)");
    // put with token
    ptok_in = 1; data_put = 8'h3C;
    @(negedge clk_put); en_put = 0; ptok_in = 0;
    check(f_i && !e_i, "cell full after put");
    check(ptok_out == 1'b1, "token passed into this cell's token flop");
    check(data_get == '0 && !valid, "get bus idle without get");
    // en_put without token does not overwrite
    en_put = 1; data_put = 8'hFF;
    @(negedge clk_put); en_put = 0;
    check(ptok_out == 1'b0, "token flop follows ptok_in on the next put");
    // get enabled but no token
    @(negedge clk_get); en_get = 1; gtok_in = 0; #1ns;
    check(data_get == '0 && !valid, "bus idle without get token");
    @(negedge clk_get); check(f_i, "still full without get token");
    gtok_in = 1; #1ns;
    check(valid && data_get == 8'h3C, $sformatf("broadcast %h", data_get));
    @(posedge clk_get); #1ns; en_get = 0; gtok_in = 0;
    check(e_i && !f_i, "cell empty after get");
    check(gtok_out == 1'b1, "get token moved into this cell's token flop");
    #1ns check(data_get == '0 && !valid, "bus released after get");
    // second put/get round trip with req_put low stores valid = 0
    @(negedge clk_put); en_put = 1; ptok_in = 1; req_put = 0; data_put = 8'h77;
    @(negedge clk_put); en_put = 0; ptok_in = 0;
    check(f_i, "full after second put");
    @(negedge clk_get); en_get = 1; gtok_in = 1; #1ns;
    check(!valid && data_get == 8'h77, "stored valid bit 0 is broadcast");
    @(negedge clk_get); en_get = 0; gtok_in = 0;
    check(e_i, "empty after second get");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
