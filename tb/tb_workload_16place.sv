// tb_workload_16place: the 16-place, 8-bit configuration of every interface,
// run through mixed_timing_top with CELLS = 16.
//
// For each interface with a storing ring (mcf, aaf, asf, saf, asr, sar) the
// receiver is held off while the sender pushes: exactly 16 items must be
// accepted before the sender is refused (full, stop_out or a withheld
// put_ack), and the 16 must then come out in order.  After that each
// interface streams 200 random items with random pauses on both sides, in
// order and without loss.  The mixed-clock FIFO is also checked for one item
// per cycle with both sides requesting every cycle (the last 40 of 48
// cycles must all transfer), and the relay-station channel (RS-RS-MCRS-RS)
// streams with random stops.  Clocks: 10, 14, 8, 12, 9, 13, 11 and 15 ns.
`timescale 1ns/1ps
module tb_workload_16place;
  localparam int unsigned CELLS = 16;
  localparam int unsigned W     = 8;
  localparam int unsigned N     = 200;
  logic rst_n = 1;
  initial #1ns rst_n = 0;
  logic mcf_clk_put = 0, mcf_clk_get = 0, asf_clk_get = 0, saf_clk_put = 0;
  logic lis_clk1 = 0, lis_clk2 = 0, asr_clk_get = 0, sar_clk_put = 0;
  always #5ns   mcf_clk_put = ~mcf_clk_put;
  always #7ns   mcf_clk_get = ~mcf_clk_get;
  always #4ns   asf_clk_get = ~asf_clk_get;
  always #6ns   saf_clk_put = ~saf_clk_put;
  always #4.5ns lis_clk1    = ~lis_clk1;
  always #6.5ns lis_clk2    = ~lis_clk2;
  always #5.5ns asr_clk_get = ~asr_clk_get;
  always #7.5ns sar_clk_put = ~sar_clk_put;

  logic mcf_req_put = 0, mcf_req_get = 0, mcf_full, mcf_valid_get, mcf_empty;
  logic [W-1:0] mcf_data_put = '0, mcf_data_get;
  logic aaf_put_req = 0, aaf_put_ack, aaf_get_req = 0, aaf_get_ack;
  logic [W-1:0] aaf_put_data = '0, aaf_get_data;
  logic asf_put_req = 0, asf_put_ack, asf_req_get = 0, asf_valid_get, asf_empty;
  logic [W-1:0] asf_put_data = '0, asf_data_get;
  logic saf_req_put = 0, saf_full, saf_get_req = 0, saf_get_ack;
  logic [W-1:0] saf_data_put = '0, saf_get_data;
  logic lis_valid_in = 0, lis_stop_out, lis_valid_out, lis_stop_in = 0;
  logic [W-1:0] lis_data_in = '0, lis_data_out;
  logic asr_put_req = 0, asr_put_ack, asr_valid_out, asr_stop_in = 1;
  logic [W-1:0] asr_put_data = '0, asr_data_out;
  logic sar_valid_in = 0, sar_stop_out, sar_get_req = 0, sar_get_ack;
  logic [W-1:0] sar_data_in = '0, sar_get_data;

  mixed_timing_top #(.CELLS(CELLS), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [W-1:0] q_mcf [$], q_aaf [$], q_asf [$], q_saf [$], q_lis [$], q_asr [$], q_sar [$];

  // ---------------- mixed-clock FIFO
  task automatic mcf_put(input bit req, output bit taken);
    @(negedge mcf_clk_put);
    mcf_req_put = req; mcf_data_put = W'($urandom);
    #1ns taken = req && !mcf_full;
    if (taken) q_mcf.push_back(mcf_data_put);
    @(posedge mcf_clk_put); #0.1ns mcf_req_put = 0;
  endtask
  task automatic mcf_get(input bit req, output bit got);
    @(negedge mcf_clk_get);
    mcf_req_get = req;
    #1ns got = mcf_valid_get;
    if (got) check(q_mcf.size() > 0 && mcf_data_get == q_mcf.pop_front(), "mcf order");
    @(posedge mcf_clk_get); #0.1ns mcf_req_get = 0;
  endtask

  // ---------------- 4-phase put senders; wait_ps bounds the wait for put_ack
  task automatic aaf_put(input logic [W-1:0] d, input int wait_ps, output bit taken);
    aaf_put_data = d; #0.1ns aaf_put_req = 1;
    fork begin wait (aaf_put_ack); end begin #(wait_ps * 1ps); end join_any
    disable fork;
    taken = aaf_put_ack;
    if (taken) begin q_aaf.push_back(d); #0.1ns aaf_put_req = 0; wait (!aaf_put_ack); end
    else aaf_put_req = 0;  // refused: withdrawn while the ring is idle
  endtask
  task automatic asf_put(input logic [W-1:0] d, input int wait_ps, output bit taken);
    asf_put_data = d; #0.1ns asf_put_req = 1;
    fork begin wait (asf_put_ack); end begin #(wait_ps * 1ps); end join_any
    disable fork;
    taken = asf_put_ack;
    if (taken) begin q_asf.push_back(d); #0.1ns asf_put_req = 0; wait (!asf_put_ack); end
    else asf_put_req = 0;  // refused: withdrawn while the ring is idle
  endtask
  task automatic asr_put(input logic [W-1:0] d, input int wait_ps, output bit taken);
    asr_put_data = d; #0.1ns asr_put_req = 1;
    fork begin wait (asr_put_ack); end begin #(wait_ps * 1ps); end join_any
    disable fork;
    taken = asr_put_ack;
    if (taken) begin q_asr.push_back(d); #0.1ns asr_put_req = 0; wait (!asr_put_ack); end
    else asr_put_req = 0;  // refused: withdrawn while the ring is idle
  endtask

  // ---------------- 4-phase get receivers
  task automatic aaf_get();
    aaf_get_req = 1; wait (aaf_get_ack);
    check(q_aaf.size() > 0 && aaf_get_data == q_aaf.pop_front(), "aaf order");
    #0.1ns aaf_get_req = 0; wait (!aaf_get_ack);
  endtask
  task automatic saf_get();
    saf_get_req = 1; wait (saf_get_ack);
    check(q_saf.size() > 0 && saf_get_data == q_saf.pop_front(), "saf order");
    #0.1ns saf_get_req = 0; wait (!saf_get_ack);
  endtask
  task automatic sar_get();
    sar_get_req = 1; wait (sar_get_ack);
    check(q_sar.size() > 0 && sar_get_data == q_sar.pop_front(), "sar order");
    #0.1ns sar_get_req = 0; wait (!sar_get_ack);
  endtask

  // ---------------- synchronous receivers and senders
  task automatic asf_get(input bit req);
    @(negedge asf_clk_get);
    asf_req_get = req;
    #1ns if (asf_valid_get) check(q_asf.size() > 0 && asf_data_get == q_asf.pop_front(), "asf order");
    @(posedge asf_clk_get); #0.1ns asf_req_get = 0;
  endtask
  task automatic saf_put(input bit req, output bit taken);
    @(negedge saf_clk_put);
    saf_req_put = req; saf_data_put = W'($urandom);
    #1ns taken = req && !saf_full;
    if (taken) q_saf.push_back(saf_data_put);
    @(posedge saf_clk_put); #0.1ns saf_req_put = 0;
  endtask
  // asr receiver: samples every cycle; stop_in driven by asr_stop_pct
  int asr_stop_pct = 100;
  always @(negedge asr_clk_get) if (rst_n) begin
    asr_stop_in = ($urandom % 100) < asr_stop_pct;
    #1ns;
    check(!(asr_valid_out && asr_stop_in), "asr valid while stopped");
    if (asr_valid_out) check(q_asr.size() > 0 && asr_data_out == q_asr.pop_front(), "asr order");
  end
  // sar sender: one packet per cycle while sar_on, held while stop_out
  bit sar_on = 0, sar_hold = 0;
  int sar_taken = 0, sar_stopped = 0;
  always @(negedge sar_clk_put) if (rst_n) begin
    if (!sar_hold) begin sar_valid_in = sar_on && (($urandom % 3) != 0); sar_data_in = W'($urandom); end
    #1ns;
    if (!sar_stop_out) begin
      if (sar_valid_in) begin q_sar.push_back(sar_data_in); sar_taken++; end
      sar_hold = 0;
    end else begin sar_hold = 1; sar_stopped++; end
  end
  // relay-station channel
  bit lis_run = 1, lis_hold = 0;
  int lis_stop_pct = 40, n_lis = 0;
  always @(negedge lis_clk1) if (rst_n && lis_run) begin
    if (!lis_hold) begin lis_valid_in = ($urandom % 4) != 0; lis_data_in = W'($urandom); end
    #1ns;
    if (!lis_stop_out) begin
      if (lis_valid_in) q_lis.push_back(lis_data_in);
      lis_hold = 0;
    end else lis_hold = 1;
  end
  always @(negedge lis_clk2) if (rst_n) begin
    lis_stop_in = ($urandom % 100) < lis_stop_pct;
    #1ns;
    if (!lis_stop_in && lis_valid_out) begin
      check(q_lis.size() > 0 && lis_data_out == q_lis.pop_front(), "lis order");
      n_lis++;
    end
  end

  bit t, g;
  initial begin
    #20ns rst_n = 1;
    fork
      // mcf: fill, drain, full rate, stream
      begin
        int cnt = 0;
        repeat (CELLS + 6) begin mcf_put(1'b1, t); cnt += t; end
        check(cnt == CELLS, $sformatf("mcf holds %0d items", cnt));
        repeat (CELLS + 4) mcf_get(1'b1, g);
        check(q_mcf.size() == 0, "mcf drained");
        fork
          begin repeat (48) mcf_put(1'b1, t); end
          begin
            int n = 0;
            repeat (8) mcf_get(1'b1, g);
            repeat (40) begin mcf_get(1'b1, g); n += g; end
            check(n == 40, $sformatf("mcf one get per cycle: %0d of 40", n));
          end
        join
        repeat (CELLS + 4) mcf_get(1'b1, g);
        fork
          begin for (int k = 0; k < N; ) begin mcf_put(($urandom % 4) != 0, t); k += t; end end
          begin repeat (3*N) mcf_get(($urandom % 3) != 0, g); repeat (CELLS + 4) mcf_get(1'b1, g); end
        join
      end
      // aaf
      begin
        int cnt_q = 0;
        for (int k = 0; k < CELLS + 1; k++) begin aaf_put(W'(k), 50000, t); cnt_q += t; end
        check(cnt_q == CELLS, $sformatf("aaf holds %0d items", cnt_q));
        repeat (CELLS) aaf_get();
        fork
          begin for (int k = 0; k < N; k++) begin #($urandom_range(0, 3000) * 1ps); aaf_put(W'($urandom), 1000000, t); end end
          begin for (int k = 0; k < N; k++) begin #($urandom_range(0, 3000) * 1ps); aaf_get(); end end
        join
      end
      // asf
      begin
        int cnt_a = 0;
        for (int k = 0; k < CELLS + 1; k++) begin asf_put(W'(k), 50000, t); cnt_a += t; end
        check(cnt_a == CELLS, $sformatf("asf holds %0d items", cnt_a));
        repeat (CELLS + 6) asf_get(1'b1);
        check(q_asf.size() == 0, "asf drained");
        fork
          begin for (int k = 0; k < N; k++) begin #($urandom_range(0, 12000) * 1ps); asf_put(W'($urandom), 1000000, t); end end
          begin repeat (4*N) asf_get(($urandom % 3) != 0); repeat (CELLS + 6) asf_get(1'b1); end
        join
      end
      // saf
      begin
        int cnt_s = 0;
        repeat (CELLS + 6) begin saf_put(1'b1, t); cnt_s += t; end
        check(cnt_s == CELLS, $sformatf("saf holds %0d items", cnt_s));
        repeat (CELLS) saf_get();
        fork
          begin for (int k = 0; k < N; ) begin saf_put(($urandom % 3) != 0, t); k += t; end end
          begin for (int k = 0; k < N; k++) begin #($urandom_range(0, 12000) * 1ps); saf_get(); end end
        join
      end
      // asr: receiver stopped while filling
      begin
        int cnt_r = 0;
        for (int k = 0; k < CELLS + 1; k++) begin asr_put(W'(k), 50000, t); cnt_r += t; end
        check(cnt_r == CELLS, $sformatf("asr holds %0d items", cnt_r));
        asr_stop_pct = 0;
        repeat (CELLS + 6) @(posedge asr_clk_get);
        check(q_asr.size() == 0, "asr drained");
        asr_stop_pct = 35;
        for (int k = 0; k < N; k++) begin #($urandom_range(0, 12000) * 1ps); asr_put(W'($urandom), 1000000, t); end
        asr_stop_pct = 0;
        repeat (CELLS + 6) @(posedge asr_clk_get);
      end
      // sar: sender runs with no receiver until stopped
      begin
        sar_on = 1;
        repeat (3*CELLS) @(posedge sar_clk_put);
        check(sar_taken == CELLS && sar_stop_out, $sformatf("sar holds %0d packets", sar_taken));
        for (int k = 0; k < N; k++) begin #($urandom_range(0, 20000) * 1ps); sar_get(); end
        @(posedge sar_clk_put); #2ns sar_on = 0; sar_valid_in = 0;
        repeat (2) @(posedge sar_clk_put);
        while (q_sar.size() > 0) sar_get();
      end
      // relay-station channel
      begin
        repeat (4*N) @(posedge lis_clk1);
        #2ns lis_run = 0; lis_valid_in = 0; lis_stop_pct = 0;
        repeat (3*CELLS) @(posedge lis_clk2);
      end
    join
    check(q_mcf.size() == 0 && q_aaf.size() == 0 && q_asf.size() == 0 && q_saf.size() == 0,
          $sformatf("undelivered: mcf %0d aaf %0d asf %0d saf %0d", q_mcf.size(), q_aaf.size(), q_asf.size(), q_saf.size()));
    check(q_asr.size() == 0 && q_sar.size() == 0 && q_lis.size() == 0,
          $sformatf("undelivered: asr %0d sar %0d lis %0d", q_asr.size(), q_sar.size(), q_lis.size()));
    check(n_lis > N/2, $sformatf("channel delivered %0d", n_lis));
    $display("sar stopped %0d cycles, channel delivered %0d", sar_stopped, n_lis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
