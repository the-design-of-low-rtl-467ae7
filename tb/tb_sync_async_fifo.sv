// tb_sync_async_fifo: self-checking testbench of sync_async_fifo (4 cells,
// 8 bits): synchronous sender on a 10 ns clock, 4-phase receiver.
//
// Checks: items arrive in order; an item put while the receiver waits is
// acknowledged within two handshake delays of the put edge; with no
// receiver exactly CELLS items are taken and full holds; a get on the empty
// FIFO is withheld until an item is put; random traffic with both full
// stalls and withheld gets.
`timescale 1ns/1ps
module tb_sync_async_fifo;
  localparam int unsigned CELLS = 4;
  localparam int unsigned W     = 8;
  logic rst_n = 1;
  initial #1ns rst_n = 0;
  logic clk_put = 0, req_put = 0, get_req = 0;
  logic [W-1:0] data_put = '0;
  logic full, get_ack;
  logic [W-1:0] get_data;
  always #5ns clk_put = ~clk_put;

  sync_async_fifo #(.CELLS(CELLS), .W(W), .DLY_PS(200)) dut (.*);

  int checks = 0, failures = 0, n_full_stall = 0, n_get_wait = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] seq = 8'h80;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic put_cycle(input bit req, output bit taken);
    @(negedge clk_put);
    req_put = req; data_put = seq;
    #1ns;
    taken = req && !full;
    if (req && full) n_full_stall++;
    if (taken) begin model.push_back(seq); seq++; end
    @(posedge clk_put); #0.1ns;
    req_put = 1'b0;
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

  realtime wg, t_edge;
  bit t, got;
  int cnt;
  initial begin
    #20ns rst_n = 1;
    // ---- latency, receiver waiting (get withheld on the empty FIFO)
    fork
      begin do_get(wg); end
      begin #30ns put_cycle(1'b1, t); t_edge = $realtime - 0.1; end
    join
    $display("get waited %0.2f ns, ack %0.2f ns after the put edge", wg, $realtime - t_edge);
    check(wg > 20.0, "get withheld while the FIFO was empty");
    check(t && wg - (t_edge - 20.0) <= 0.45 + 0.2, "ack within two handshake delays of the put edge");
    // ---- fill
    cnt = 0;
    repeat (4*CELLS) begin put_cycle(1'b1, t); if (t) cnt++; end
    check(cnt == CELLS, $sformatf("accepted %0d, expected %0d", cnt, CELLS));
    check(full, "full held");
    repeat (CELLS) do_get(wg);
    check(model.size() == 0, "drained");
    // ---- random traffic
    fork
      begin repeat (800) put_cycle(($urandom % 4) != 0, t); end
      begin
        for (int k = 0; k < 500; k++) begin
          #($urandom_range(0, k < 250 ? 30000 : 2000) * 1ps);
          do_get(wg);
          if (wg > 1.0) n_get_wait++;
        end
      end
    join
    while (model.size() > 0) do_get(wg);
    $display("full stalls %0d withheld gets %0d", n_full_stall, n_get_wait);
    check(n_full_stall > 0 && n_get_wait > 0, "full and empty both occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
