// tb_mixed_clock_fifo: self-checking testbench of mixed_clock_fifo at its
// default size (4 cells, 8 bits), with unrelated put and get clocks.
//
// Inputs are driven at the falling edge of their own clock and the outputs
// are sampled 1 ns later; a put counts when req_put is high and full low, a
// get when valid_get is high, and both take effect at the next rising edge.
// A reference queue checks order and contents.  Phases:
//   1 latency   - one item into the empty FIFO while the receiver waits; it
//                 must come out within two get cycles of the put edge;
//   2 deadlock  - one item with the get side idle: empty must fall (the
//                 bi-modal detector switched to true empty) and the item must
//                 be delivered at the first get;
//   3 fill      - puts only: the FIFO must accept exactly CELLS items and
//                 then hold full; drain in order, then empty;
//   4 rate      - both sides always requesting, get clock faster: after the
//                 start, one put per put cycle with no stall;
//   5 random    - random requests on both sides, counting full stalls and
//                 empty stalls; both must occur.
`timescale 1ns/1ps
module tb_mixed_clock_fifo;
  localparam int unsigned CELLS = 4;
  localparam int unsigned W     = 8;

  logic         rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;
  logic         clk_put = 1'b0, clk_get = 1'b0;
  logic         req_put = 1'b0, req_get = 1'b0;
  logic [W-1:0] data_put = '0;
  logic         full, empty, valid_get;
  logic [W-1:0] data_get;

  real put_half = 5.0, get_half = 7.0;
  always #(put_half * 1ns) clk_put = ~clk_put;
  initial begin #3ns; forever #(get_half * 1ns) clk_get = ~clk_get; end

  mixed_clock_fifo dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] next_val = 8'h01;
  int n_put = 0, n_get = 0, n_full_stall = 0, n_empty_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // One put cycle: returns 1 if the item was taken.
  task automatic put_cycle(input bit req, output bit taken);
    @(negedge clk_put);
    req_put = req; data_put = next_val;
    #1ns;
    taken = req && !full;
    if (req && full) n_full_stall++;
    if (taken) begin model.push_back(next_val); next_val++; n_put++; end
    @(posedge clk_put); #0.1ns;
    req_put = 1'b0;
  endtask

  // One get cycle: returns 1 if an item was delivered (and checks it).
  task automatic get_cycle(input bit req, output bit got);
    @(negedge clk_get);
    req_get = req;
    #1ns;
    got = valid_get;
    if (req && empty) n_empty_stall++;
    check(!(valid_get && !req), "valid_get without req_get");
    if (got) begin
      check(model.size() > 0, "get from an empty FIFO");
      if (model.size() > 0) begin
        logic [W-1:0] exp_v;
        exp_v = model.pop_front();
        check(data_get == exp_v, $sformatf("data %h expected %h", data_get, exp_v));
      end
      n_get++;
    end
    @(posedge clk_get); #0.1ns;
    req_get = 1'b0;
  endtask

  bit t, g;
  realtime t_put, t_got;
  int cnt;

  initial begin
    #20ns rst_n = 1'b1;
    repeat (3) @(posedge clk_put);
    check(empty == 1'b1 && full == 1'b0, "state after reset");

    // ---- phase 1: latency into an empty FIFO
    fork
      begin put_cycle(1'b1, t); t_put = $realtime; end
      begin
        g = 0; cnt = 0;
        while (!g && cnt < 20) begin get_cycle(1'b1, g); cnt++; end
        t_got = $realtime;
      end
    join
    check(g, "latency item delivered");
    $display("latency: %0.1f ns (get period %0.1f ns)", t_got - t_put, 2*get_half);
    check(t_got - t_put <= 2 * (2*get_half) + 0.2, "latency within two get cycles");
    req_get = 1'b0;

    // ---- phase 2: a single item, get side idle
    put_cycle(1'b1, t);
    check(t, "phase 2 put taken");
    repeat (6) get_cycle(1'b0, g);
    check(empty == 1'b0, "one item and idle get side: empty must be low");
    get_cycle(1'b1, g);
    check(g, "single item delivered at the first get (no deadlock)");
    repeat (3) get_cycle(1'b0, g);
    check(empty == 1'b1, "empty again after the last item");

    // ---- phase 3: fill to full, then drain
    cnt = 0;
    repeat (4*CELLS) begin put_cycle(1'b1, t); if (t) cnt++; end
    check(cnt == CELLS, $sformatf("accepted %0d items before full, expected %0d", cnt, CELLS));
    check(full == 1'b1, "full held while no gets");
    cnt = 0;
    repeat (4*CELLS) begin get_cycle(1'b1, g); if (g) cnt++; end
    check(cnt == CELLS, $sformatf("drained %0d items, expected %0d", cnt, CELLS));
    check(model.size() == 0, "reference queue empty after drain");
    check(empty == 1'b1, "empty after drain");
    req_get = 1'b0;
    repeat (3) @(posedge clk_put);
    check(full == 1'b0, "full low after drain");

    // ---- phase 4: rate, get clock faster than put clock
    get_half = 4.0;
    cnt = 0;
    fork
      begin
        for (int k = 0; k < 60; k++) begin
          put_cycle(1'b1, t);
          if (k >= 10 && t) cnt++;
        end
      end
      begin repeat (120) get_cycle(1'b1, g); end
    join
    check(cnt == 50, $sformatf("steady state: %0d of 50 put cycles took an item", cnt));
    req_get = 1'b0;
    repeat (8) get_cycle(1'b1, g);
    check(model.size() == 0, "all rate-test items delivered");

    // ---- phase 5: random traffic, put clock faster at times
    get_half = 7.0;
    fork
      begin repeat (1500) put_cycle(($urandom % 4) != 0, t); end
      begin repeat (1100) get_cycle(($urandom % 3) != 0, g); end
    join
    repeat (3*CELLS) get_cycle(1'b1, g);
    check(model.size() == 0, $sformatf("%0d items left undelivered", model.size()));
    $display("puts %0d gets %0d full-stalls %0d empty-stalls %0d", n_put, n_get, n_full_stall, n_empty_stall);
    check(n_full_stall > 0, "full stall occurred");
    check(n_empty_stall > 0, "empty stall occurred");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
