// tb_async_async_fifo: self-checking testbench of async_async_fifo (4
// cells, 8 bits, 200 ps handshake delay).
//
// A 4-phase sender and a 4-phase receiver with random gaps.  Checks: items
// arrive in order; the handshake rules hold (no new request before the
// previous acknowledgment has fallen, ack only after req); the latency of
// one item into the empty FIFO with the receiver waiting is at most two
// handshake delays; with no receiver, exactly CELLS puts are acknowledged
// and the next put_ack is withheld until an item is taken; a get on the
// empty FIFO is withheld until an item arrives.  Counts withheld puts and
// withheld gets in the random phase; both must occur.
`timescale 1ns/1ps
module tb_async_async_fifo;
  localparam int unsigned CELLS = 4;
  localparam int unsigned W     = 8;
  logic rst_n = 1;
  initial #1ns rst_n = 0;
  logic put_req = 0, get_req = 0;
  logic [W-1:0] put_data = '0;
  logic put_ack, get_ack;
  logic [W-1:0] get_data;

  async_async_fifo #(.CELLS(CELLS), .W(W), .DLY_PS(200)) dut (.*);

  int checks = 0, failures = 0, n_put_wait = 0, n_get_wait = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] seq = 8'h40;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // one 4-phase put; returns the time from req+ to ack+
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

  task automatic do_get(output realtime waited);
    realtime t0;
    get_req = 1; t0 = $realtime;
    wait (get_ack);
    waited = $realtime - t0;
    check(model.size() > 0, "get acknowledged with nothing put");
    if (model.size() > 0) check(get_data == model.pop_front(), $sformatf("data %h", get_data));
    #0.1ns get_req = 0;
    wait (!get_ack);
  endtask

  realtime w, wp, wg;
  bit put_done;
  initial begin
    #5ns rst_n = 1;
    #5ns check(!put_ack && !get_ack, "acks low after reset");
    // ---- latency: receiver waiting on the empty FIFO
    fork
      begin do_get(wg); end
      begin #5ns do_put(8'hA1, wp); end
    join
    $display("get waited %0.2f ns after the put request (put handshake %0.2f ns)", wg - 5.0, wp);
    check(wg - 5.0 <= 0.45, "latency at most two handshake delays");
    // ---- fill without receiver
    for (int k = 0; k < CELLS; k++) begin
      do_put(seq, w); seq++;
      check(w < 1.0, "put into a free cell acknowledged at once");
    end
    put_done = 0;
    fork
      begin do_put(seq, w); seq++; put_done = 1; end
      begin
        #20ns check(!put_done && !put_ack, "ack withheld on a full FIFO");
        do_get(wg);
        #5ns check(put_done, "withheld put completes after a get");
      end
    join
    repeat (CELLS) do_get(wg);
    check(model.size() == 0, "FIFO drained");
    // ---- random traffic
    fork
      begin
        repeat (500) begin
          #($urandom_range(0, 1500) * 1ps);
          do_put(seq, w); seq++;
          if (w > 1.0) n_put_wait++;
        end
      end
      begin
        for (int k = 0; k < 500; k++) begin
          #($urandom_range(0, k < 250 ? 4000 : 300) * 1ps);
          do_get(wg);
          if (wg > 1.0) n_get_wait++;
        end
      end
    join
    check(model.size() == 0, "all items delivered");
    $display("withheld puts %0d, withheld gets %0d", n_put_wait, n_get_wait);
    check(n_put_wait > 0 && n_get_wait > 0, "full and empty both occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
