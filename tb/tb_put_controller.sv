// tb_put_controller: exhaustive check of put_controller: en_put must be high
// exactly when a put is requested and the FIFO is not full.
`timescale 1ns/1ps
module tb_put_controller;
  logic req_put, full, en_put;
  put_controller dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int k = 0; k < 4; k++) begin
      {req_put, full} = 2'(k);
      #1ns;
      checks++;
      if (en_put !== (k == 2)) begin
        failures++; $display("FAIL req_put=%b full=%b en_put=%b", req_put, full, en_put);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
