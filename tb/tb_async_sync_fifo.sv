// tb_async_sync_fifo: self-checking testbench of async_sync_fifo (4 cells,
// 8 bits): 4-phase sender, synchronous receiver on a 14 ns clock.
//
// Checks: items arrive in order; one item put while the receiver waits is
// delivered within two get cycles; a single item with the get side idle is
// released (bi-modal empty) and taken at the first get; with the receiver
// idle exactly CELLS puts are acknowledged and the next put_ack is withheld
// until a get; random traffic with both withheld puts and empty stalls.
`timescale 1ns/1ps
module tb_async_sync_fifo;
  localparam int unsigned CELLS = 4;
  localparam int unsigned W     = 8;
  logic rst_n = 1;
  initial #1ns rst_n = 0;
  logic put_req = 0, clk_get = 0, req_get = 0;
  logic [W-1:0] put_data = '0;
  logic put_ack, valid_get, empty;
  logic [W-1:0] data_get;
  always #7ns clk_get = ~clk_get;

  async_sync_fifo #(.CELLS(CELLS), .W(W), .DLY_PS(200)) dut (.*);

  int checks = 0, failures = 0, n_put_wait = 0, n_empty_stall = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] seq = 8'h60;
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

  task automatic get_cycle(input bit req, output bit got);
    @(negedge clk_get);
    req_get = req;
    #1ns;
    got = valid_get;
    if (req && empty) n_empty_stall++;
    if (got) begin
      check(model.size() > 0, "get from an empty FIFO");
      if (model.size() > 0) check(data_get == model.pop_front(), $sformatf("data %h", data_get));
    end
    @(posedge clk_get); #0.1ns;
    req_get = 1'b0;
  endtask

  realtime w, t_put;
  bit g, put_done;
  int cnt;
  initial begin
    #20ns rst_n = 1;
    // ---- latency
    fork
      begin #30ns; t_put = $realtime; do_put(8'hB2, w); end
      begin g = 0; cnt = 0; while (!g && cnt < 20) begin get_cycle(1'b1, g); cnt++; end end
    join
    $display("latency %0.2f ns", $realtime - 0.1 - t_put);
    check(g && ($realtime - t_put) <= 2 * 14.0 + 1.5, "latency within two get cycles");
    // ---- single item, idle get side
    do_put(seq, w); seq++;
    repeat (5) get_cycle(1'b0, g);
    check(!empty, "single item visible while get side idle");
    get_cycle(1'b1, g);
    check(g, "single item taken at the first get");
    // ---- fill, withheld ack
    for (int k = 0; k < CELLS; k++) begin do_put(seq, w); seq++; end
    put_done = 0;
    fork
      begin do_put(seq, w); seq++; put_done = 1; end
      begin
        #50ns check(!put_done, "ack withheld on a full FIFO");
        get_cycle(1'b1, g); get_cycle(1'b0, g);
        #5ns check(put_done, "withheld put completes after a get");
      end
    join
    repeat (2*CELLS) get_cycle(1'b1, g);
    check(model.size() == 0, "drained");
    // ---- random traffic
    fork
      begin
        for (int k = 0; k < 400; k++) begin
          #($urandom_range(0, k < 200 ? 3000 : 30000) * 1ps);
          do_put(seq, w); seq++;
          if (w > 1.0) n_put_wait++;
        end
      end
      begin repeat (900) get_cycle(($urandom % 3) != 0, g); end
    join
    repeat (3*CELLS) get_cycle(1'b1, g);
    check(model.size() == 0, $sformatf("%0d items undelivered", model.size()));
    $display("withheld puts %0d empty stalls %0d", n_put_wait, n_empty_stall);
    check(n_put_wait > 0 && n_empty_stall > 0, "full and empty both occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
