// tb_async_sync_rs: self-checking testbench of async_sync_rs (4 cells, 8
// bits): a 4-phase sender with random gaps, a relay-station receiver on a
// 12 ns clock with random stop_in.
//
// Checks: items arrive in order, once; valid_out never rises while stop_in
// is high; a single item with a quiet put side still leaves (bi-modal
// empty); put_ack is withheld while the ring is full.  Counts withheld puts,
// stop_in cycles and invalid output packets; each must occur.
`timescale 1ns/1ps
module tb_async_sync_rs;
  localparam int unsigned CELLS = 4;
  localparam int unsigned W     = 8;
  logic rst_n = 1;
  initial #1ns rst_n = 0;
  logic put_req = 0, clk_get = 0, stop_in = 0;
  logic [W-1:0] put_data = '0;
  logic put_ack, valid_out;
  logic [W-1:0] data_out;
  always #6ns clk_get = ~clk_get;

  async_sync_rs #(.CELLS(CELLS), .W(W), .DLY_PS(200)) dut (.*);

  int checks = 0, failures = 0, n_put_wait = 0, n_stop = 0, n_invalid = 0, n_recv = 0;
  int stop_pct = 0;
  bit recv_on = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] seq = 8'h30;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic do_put(input logic [W-1:0] d, output realtime waited);
    realtime t0;
    put_data = d;
    #0.1ns put_req = 1; t0 = $realtime;
    model.push_back(d);
    wait (put_ack);
    waited = $realtime - t0;
    #0.1ns put_req = 0;
    wait (!put_ack);
  endtask

  always @(negedge clk_get) if (recv_on) begin
    stop_in = ($urandom % 100) < stop_pct;
    #1ns;
    if (stop_in) n_stop++;
    check(!(valid_out && stop_in), "valid_out while stopped");
    if (valid_out) begin
      check(model.size() > 0 && data_out == model.pop_front(), "order");
      n_recv++;
    end else n_invalid++;
  end

  realtime w;
  bit done;
  initial begin
    #20ns rst_n = 1;
    recv_on = 1;
    do_put(8'hE1, w);
    repeat (6) @(posedge clk_get);
    check(model.size() == 0, "single item left the quiet station");
    stop_pct = 100;
    for (int k = 0; k < CELLS; k++) begin do_put(seq, w); seq++; end
    done = 0;
    fork
      begin do_put(seq, w); seq++; done = 1; end
      begin #60ns check(!done, "put_ack withheld while full"); stop_pct = 0; end
    join
    stop_pct = 35;
    for (int k = 0; k < 600; k++) begin
      #($urandom_range(0, k < 300 ? 2000 : 30000) * 1ps);
      do_put(seq, w); seq++;
      if (w > 1.0) n_put_wait++;
    end
    stop_pct = 0;
    repeat (20) @(posedge clk_get);
    check(model.size() == 0, $sformatf("%0d items undelivered", model.size()));
    $display("received %0d withheld puts %0d stop_in %0d invalid %0d", n_recv, n_put_wait, n_stop, n_invalid);
    check(n_put_wait > 0 && n_stop > 0 && n_invalid > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
