// tb_sync_async_rs: self-checking testbench of sync_async_rs (4 cells, 8
// bits): a relay-station sender on a 10 ns clock that offers a packet every
// cycle (valid or not) and holds it while stop_out is high, and a 4-phase
// receiver with random gaps.
//
// Checks: valid packets arrive in order, once, and invalid ones are never
// stored; stop_out rises when the receiver stops taking items and the ring
// fills; a get on the empty station is withheld.  Counts stop_out cycles
// and withheld gets; both must occur.
`timescale 1ns/1ps
module tb_sync_async_rs;
  localparam int unsigned CELLS = 4;
  localparam int unsigned W     = 8;
  logic rst_n = 1;
  initial #1ns rst_n = 0;
  logic clk_put = 0, valid_in = 0, get_req = 0;
  logic [W-1:0] data_in = '0;
  logic stop_out, get_ack;
  logic [W-1:0] get_data;
  always #5ns clk_put = ~clk_put;

  sync_async_rs #(.CELLS(CELLS), .W(W), .DLY_PS(200)) dut (.*);

  int checks = 0, failures = 0, n_stop_out = 0, n_get_wait = 0, n_recv = 0;
  bit sender_on = 0, hold = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] seq = 8'h50;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(negedge clk_put) if (sender_on) begin
    if (!hold) begin valid_in = ($urandom % 3) != 0; data_in = seq; end
    #1ns;
    if (!stop_out) begin
      if (valid_in) begin model.push_back(data_in); seq++; end
      hold = 0;
    end else begin hold = 1; n_stop_out++; end
  end

  task automatic do_get(output realtime waited);
    realtime t0;
    get_req = 1; t0 = $realtime;
    wait (get_ack);
    waited = $realtime - t0;
    check(model.size() > 0 && get_data == model.pop_front(), $sformatf("data %h", get_data));
    n_recv++;
    #0.1ns get_req = 0;
    wait (!get_ack);
  endtask

  realtime w;
  initial begin
    #20ns rst_n = 1;
    fork
      begin do_get(w); check(w > 20.0, "get withheld on the empty station"); end
      begin #30ns sender_on = 1; end
    join
    repeat (20) @(posedge clk_put);
    check(stop_out, "stop_out raised with no receiver");
    for (int k = 0; k < 700; k++) begin
      #($urandom_range(0, k < 350 ? 30000 : 2000) * 1ps);
      do_get(w);
      if (w > 1.0) n_get_wait++;
    end
    @(posedge clk_put); #2ns sender_on = 0; valid_in = 0;
    while (model.size() > 0) do_get(w);
    $display("received %0d stop_out %0d withheld gets %0d", n_recv, n_stop_out, n_get_wait);
    check(n_stop_out > 0 && n_get_wait > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
