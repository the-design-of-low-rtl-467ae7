// tb_get_controller: self-checking testbench of get_controller.
//
// A cycle-level reference of the bi-modal empty rule runs beside the block:
// oe' = te | en_get, empty = ne & oe, en_get = req_get & ~empty,
// valid_get = en_get & bus_valid.  Random inputs for 400 cycles; the test
// also counts cycles where a single item (ne=1, te=0) is released while the
// get side was idle (true-empty mode) and cycles where empty is held by ne
// after a get (new-empty mode); both must occur.
`timescale 1ns/1ps
module tb_get_controller;
  logic clk_get = 0, rst_n = 1;
  initial #1ns rst_n = 0;
  logic req_get = 0, ne = 1, te = 1, bus_valid = 1;
  logic en_get, empty, valid_get;
  always #7ns clk_get = ~clk_get;

  get_controller dut (.*);

  int checks = 0, failures = 0, n_oe_mode = 0, n_ne_mode = 0;
  logic oe_ref;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #12ns rst_n = 1; oe_ref = 1;
    repeat (400) begin
      logic exp_empty, exp_en;
      @(negedge clk_get);
      req_get = $urandom_range(0, 3) != 0; te = $urandom_range(0, 3) == 0;
      ne = te | ($urandom_range(0, 1) == 1); bus_valid = $urandom_range(0, 7) != 0;
      #1ns;
      exp_empty = ne & oe_ref;
      exp_en    = req_get & ~exp_empty;
      check(empty == exp_empty, "empty");
      check(en_get == exp_en, "en_get");
      check(valid_get == (exp_en & bus_valid), "valid_get");
      if (ne && !te && !oe_ref && en_get) n_oe_mode++;
      if (ne && oe_ref && !te && empty) n_ne_mode++;
      @(posedge clk_get); oe_ref = te | exp_en;
    end
    $display("true-empty releases %0d, new-empty holds %0d", n_oe_mode, n_ne_mode);
    check(n_oe_mode > 0 && n_ne_mode > 0, "both empty modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
