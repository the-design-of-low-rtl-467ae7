// tb_mixed_clock_rs: self-checking testbench of the mixed-clock relay
// station (4 cells, 8 bits), put clock 10 ns, get clock 14 ns or 8 ns.
//
// Upstream, a relay-station-like sender offers a packet every clk_put cycle
// (valid or not) and holds it while stop_out is high.  Downstream, a
// receiver drives stop_in at random.  Checks: valid packets arrive in order
// with nothing lost or duplicated; valid_out is never high while stop_in is;
// with the receiver idle and the get clock slower, stop_out must rise
// (back pressure from a full ring); the last single packet still leaves
// when the put side is quiet; latency into an empty station is at most two
// get cycles.  Counts stop_out cycles, stop_in cycles and invalid output
// packets; each must occur.
`timescale 1ns/1ps
module tb_mixed_clock_rs;
  localparam int unsigned CELLS = 4;
  localparam int unsigned W     = 8;
  logic rst_n = 1;
  initial #1ns rst_n = 0;
  logic clk_put = 0, clk_get = 0;
  logic valid_in = 0, stop_in = 0;
  logic [W-1:0] data_in = '0;
  logic stop_out, valid_out;
  logic [W-1:0] data_out;
  real get_half = 7.0;
  always #5ns clk_put = ~clk_put;
  initial begin #2ns; forever #(get_half * 1ns) clk_get = ~clk_get; end

  mixed_clock_rs #(.CELLS(CELLS), .W(W)) dut (.*);

  int checks = 0, failures = 0, n_stop_out = 0, n_stop_in = 0, n_invalid = 0, n_recv = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] seq = 8'h20;
  bit hold = 0, sender_on = 0, recv_on = 0, got;
  int stop_pct = 0;
  realtime t_put, t_got;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // sender (clk_put domain)
  always @(negedge clk_put) if (sender_on) begin
    if (!hold) begin valid_in = ($urandom % 4) != 0; data_in = seq; end
    #1ns;
    if (!stop_out) begin
      if (valid_in) begin model.push_back(data_in); seq++; end
      hold = 0;
    end else begin hold = 1; n_stop_out++; end
  end

  // receiver (clk_get domain)
  always @(negedge clk_get) if (recv_on) begin
    stop_in = ($urandom % 100) < stop_pct;
    #1ns;
    if (stop_in) n_stop_in++;
    check(!(valid_out && stop_in), "valid_out while stopped");
    if (valid_out) begin
      check(model.size() > 0, "packet from nowhere");
      if (model.size() > 0) check(data_out == model.pop_front(), "order");
      n_recv++; got = 1; t_got = $realtime;
    end else n_invalid++;
  end

  initial begin
    #20ns rst_n = 1;
    // ---- latency of one packet into the empty station
    recv_on = 1; stop_pct = 0; got = 0;
    @(negedge clk_put); valid_in = 1; data_in = 8'h5A; #1ns model.push_back(8'h5A);
    @(posedge clk_put); t_put = $realtime; #1ns valid_in = 0;
    repeat (6) @(posedge clk_get);
    check(got, "single packet delivered (quiet put side)");
    check(t_got - t_put <= 2 * 2 * get_half, "latency within two get cycles");
    // ---- receiver stopped: ring fills, stop_out must rise
    stop_pct = 100; sender_on = 1;
    repeat (20) @(posedge clk_put);
    check(stop_out == 1, "stop_out raised when the ring is full");
    // ---- random traffic, slow and fast get clock
    stop_pct = 30;
    repeat (1500) @(posedge clk_put);
    get_half = 4.0;
    repeat (1500) @(posedge clk_put);
    #2ns sender_on = 0; valid_in = 0; stop_pct = 0;
    repeat (20) @(posedge clk_get);
    check(model.size() == 0, $sformatf("%0d packets undelivered", model.size()));
    $display("received %0d stop_out %0d stop_in %0d invalid %0d", n_recv, n_stop_out, n_stop_in, n_invalid);
    check(n_stop_out > 0 && n_stop_in > 0 && n_invalid > 0, "all stop and idle cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
