// tb_mixed_timing_top: end-to-end testbench of mixed_timing_top with every
// parameter at its default (4 cells, 8-bit items).
//
// All seven interfaces run at once, each with its own reference queue and
// random traffic, on unrelated clocks (10, 14, 8, 12, 9, 13, 11 and 15 ns
// periods):
//   mcf  synchronous sender and receiver;
//   aaf  4-phase sender and receiver;
//   asf  4-phase sender, synchronous receiver;
//   saf  synchronous sender, 4-phase receiver;
//   lis  relay-station sender into RS-RS-MCRS-RS, receiver with random stop;
//   asr  4-phase sender, relay-station receiver with random stop;
//   sar  relay-station sender, 4-phase receiver.
// Every item must arrive once, in order.  The mechanisms of the design are
// counted and each must occur at least once: full stalls (mcf, saf),
// empty stalls (mcf, asf), a single item released from a quiescent FIFO by
// the bi-modal empty detector (mcf), withheld put and get acknowledgments
// (aaf, asf, saf), back pressure at the channel input (lis_stop_out), at the
// mixed-clock relay station and from the receiver, and invalid packets;
// for asr and sar, withheld acknowledgments, stop_in, invalid packets and
// stop_out.
`timescale 1ns/1ps
module tb_mixed_timing_top;
  localparam int unsigned W = 8;
  logic rst_n = 1;
  initial #1ns rst_n = 0;
  logic mcf_clk_put = 0, mcf_clk_get = 0, asf_clk_get = 0, saf_clk_put = 0, lis_clk1 = 0, lis_clk2 = 0;
  always #5ns   mcf_clk_put = ~mcf_clk_put;
  always #7ns   mcf_clk_get = ~mcf_clk_get;
  always #4ns   asf_clk_get = ~asf_clk_get;
  always #6ns   saf_clk_put = ~saf_clk_put;
  always #4.5ns lis_clk1    = ~lis_clk1;
  always #6.5ns lis_clk2    = ~lis_clk2;
  logic asr_clk_get = 0, sar_clk_put = 0;
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
  logic asr_put_req = 0, asr_put_ack, asr_valid_out, asr_stop_in = 0;
  logic [W-1:0] asr_put_data = '0, asr_data_out;
  logic sar_valid_in = 0, sar_stop_out, sar_get_req = 0, sar_get_ack;
  logic [W-1:0] sar_data_in = '0, sar_get_data;

  mixed_timing_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [W-1:0] q_mcf [$], q_aaf [$], q_asf [$], q_saf [$], q_lis [$];
  int n_mcf = 0, n_aaf = 0, n_asf = 0, n_saf = 0, n_lis = 0;
  int c_mcf_full = 0, c_mcf_empty = 0, c_mcf_single = 0, c_aaf_put_wait = 0, c_aaf_get_wait = 0;
  int c_asf_put_wait = 0, c_asf_empty = 0, c_saf_full = 0, c_saf_get_wait = 0;
  int c_lis_stop_out = 0, c_mcrs_stop = 0, c_lis_stop_in = 0, c_lis_invalid = 0;
  int ITEMS = 600;
  bit lis_run = 1;
  logic [W-1:0] q_asr [$], q_sar [$];
  int n_asr = 0, n_sar = 0, c_asr_put_wait = 0, c_asr_stop_in = 0, c_asr_invalid = 0;
  int c_sar_stop_out = 0, c_sar_get_wait = 0;
  bit asr_rx_on = 0, sar_run = 0, sar_hold = 0;
  int asr_stop_pct = 30;

  // ---------------- mixed-clock FIFO
  task automatic mcf_put(input bit req, output bit taken);
    @(negedge mcf_clk_put);
    mcf_req_put = req; mcf_data_put = W'($urandom);
    #1ns taken = req && !mcf_full;
    if (req && mcf_full) c_mcf_full++;
    if (taken) q_mcf.push_back(mcf_data_put);
    @(posedge mcf_clk_put); #0.1ns mcf_req_put = 0;
  endtask
  task automatic mcf_get(input bit req, output bit got);
    @(negedge mcf_clk_get);
    mcf_req_get = req;
    #1ns got = mcf_valid_get;
    if (req && mcf_empty) c_mcf_empty++;
    if (got) begin
      check(q_mcf.size() > 0 && mcf_data_get == q_mcf.pop_front(), "mcf order");
      n_mcf++;
    end
    @(posedge mcf_clk_get); #0.1ns mcf_req_get = 0;
  endtask

  // ---------------- 4-phase helpers
  task automatic aaf_put(input logic [W-1:0] d);
    realtime t0;
    aaf_put_data = d; #0.1ns aaf_put_req = 1; t0 = $realtime; q_aaf.push_back(d);
    wait (aaf_put_ack); if ($realtime - t0 > 1.0) c_aaf_put_wait++;
    #0.1ns aaf_put_req = 0; wait (!aaf_put_ack);
  endtask
  task automatic aaf_get();
    realtime t0;
    aaf_get_req = 1; t0 = $realtime;
    wait (aaf_get_ack); if ($realtime - t0 > 1.0) c_aaf_get_wait++;
    check(q_aaf.size() > 0 && aaf_get_data == q_aaf.pop_front(), "aaf order");
    n_aaf++;
    #0.1ns aaf_get_req = 0; wait (!aaf_get_ack);
  endtask
  task automatic asf_put(input logic [W-1:0] d);
    realtime t0;
    asf_put_data = d; #0.1ns asf_put_req = 1; t0 = $realtime; q_asf.push_back(d);
    wait (asf_put_ack); if ($realtime - t0 > 1.0) c_asf_put_wait++;
    #0.1ns asf_put_req = 0; wait (!asf_put_ack);
  endtask
  task automatic asf_get(input bit req);
    @(negedge asf_clk_get);
    asf_req_get = req;
    #1ns if (req && asf_empty) c_asf_empty++;
    if (asf_valid_get) begin
      check(q_asf.size() > 0 && asf_data_get == q_asf.pop_front(), "asf order");
      n_asf++;
    end
    @(posedge asf_clk_get); #0.1ns asf_req_get = 0;
  endtask
  task automatic saf_put(input bit req);
    @(negedge saf_clk_put);
    saf_req_put = req; saf_data_put = W'($urandom);
    #1ns if (req && saf_full) c_saf_full++;
    if (req && !saf_full) q_saf.push_back(saf_data_put);
    @(posedge saf_clk_put); #0.1ns saf_req_put = 0;
  endtask
  task automatic saf_get();
    realtime t0;
    saf_get_req = 1; t0 = $realtime;
    wait (saf_get_ack); if ($realtime - t0 > 1.0) c_saf_get_wait++;
    check(q_saf.size() > 0 && saf_get_data == q_saf.pop_front(), "saf order");
    n_saf++;
    #0.1ns saf_get_req = 0; wait (!saf_get_ack);
  endtask

  // ---------------- relay-station channel
  bit lis_hold = 0;
  always @(negedge lis_clk1) if (rst_n && lis_run) begin
    if (!lis_hold) begin lis_valid_in = ($urandom % 4) != 0; lis_data_in = W'($urandom); end
    #1ns;
    if (!lis_stop_out) begin
      if (lis_valid_in) q_lis.push_back(lis_data_in);
      lis_hold = 0;
    end else begin lis_hold = 1; c_lis_stop_out++; end
    if (dut.s2) c_mcrs_stop++;
  end
  int lis_stop_pct = 40;
  always @(negedge lis_clk2) if (rst_n) begin
    lis_stop_in = ($urandom % 100) < lis_stop_pct;
    #1ns;
    if (lis_stop_in) c_lis_stop_in++;
    if (!lis_stop_in) begin
      if (lis_valid_out) begin
        check(q_lis.size() > 0 && lis_data_out == q_lis.pop_front(), "lis order");
        n_lis++;
      end else c_lis_invalid++;
    end
  end

  // ---------------- async-sync relay station
  task automatic asr_put(input logic [W-1:0] d);
    realtime t0;
    asr_put_data = d; #0.1ns asr_put_req = 1; t0 = $realtime; q_asr.push_back(d);
    wait (asr_put_ack); if ($realtime - t0 > 1.0) c_asr_put_wait++;
    #0.1ns asr_put_req = 0; wait (!asr_put_ack);
  endtask
  always @(negedge asr_clk_get) if (asr_rx_on) begin
    asr_stop_in = ($urandom % 100) < asr_stop_pct;
    #1ns;
    if (asr_stop_in) c_asr_stop_in++;
    check(!(asr_valid_out && asr_stop_in), "asr valid while stopped");
    if (asr_valid_out) begin
      check(q_asr.size() > 0 && asr_data_out == q_asr.pop_front(), "asr order");
      n_asr++;
    end else c_asr_invalid++;
  end

  // ---------------- sync-async relay station
  always @(negedge sar_clk_put) if (sar_run) begin
    if (!sar_hold) begin sar_valid_in = ($urandom % 3) != 0; sar_data_in = W'($urandom); end
    #1ns;
    if (!sar_stop_out) begin
      if (sar_valid_in) q_sar.push_back(sar_data_in);
      sar_hold = 0;
    end else begin sar_hold = 1; c_sar_stop_out++; end
  end
  task automatic sar_get();
    realtime t0;
    sar_get_req = 1; t0 = $realtime;
    wait (sar_get_ack); if ($realtime - t0 > 1.0) c_sar_get_wait++;
    check(q_sar.size() > 0 && sar_get_data == q_sar.pop_front(), "sar order");
    n_sar++;
    #0.1ns sar_get_req = 0; wait (!sar_get_ack);
  endtask

  bit t, g;
  initial begin
    #20ns rst_n = 1;
    fork
      // mcf: a single item into the quiescent FIFO first, then random traffic
      begin
        mcf_put(1'b1, t);
        repeat (5) mcf_get(1'b0, g);
        if (!mcf_empty) c_mcf_single++;
        mcf_get(1'b1, g);
        check(g, "mcf single item released");
        fork
          begin repeat (ITEMS) mcf_put(($urandom % 4) != 0, t); end
          begin repeat (ITEMS) mcf_get(($urandom % 3) != 0, g); end
        join
        repeat (8) mcf_get(1'b1, g);
      end
      // aaf
      fork
        begin for (int k = 0; k < ITEMS; k++) begin #($urandom_range(0, 3000) * 1ps); aaf_put(W'($urandom)); end end
        begin for (int k = 0; k < ITEMS; k++) begin #($urandom_range(0, k < ITEMS/2 ? 6000 : 300) * 1ps); aaf_get(); end end
      join
      // asf
      fork
        begin for (int k = 0; k < ITEMS; k++) begin #($urandom_range(0, k < ITEMS/2 ? 2000 : 20000) * 1ps); asf_put(W'($urandom)); end end
        begin repeat (3*ITEMS) asf_get(($urandom % 3) != 0); repeat (8) asf_get(1'b1); end
      join
      // saf
      fork
        begin repeat (2*ITEMS) saf_put(($urandom % 3) != 0); end
        begin for (int k = 0; k < ITEMS; k++) begin #($urandom_range(0, k < ITEMS/2 ? 30000 : 1000) * 1ps); saf_get(); end end
      join
      // asr
      begin
        asr_rx_on = 1;
        for (int k = 0; k < ITEMS; k++) begin #($urandom_range(0, k < ITEMS/2 ? 2000 : 25000) * 1ps); asr_put(W'($urandom)); end
        asr_stop_pct = 0;
        repeat (20) @(posedge asr_clk_get);
      end
      // sar
      begin
        sar_run = 1;
        for (int k = 0; k < ITEMS; k++) begin #($urandom_range(0, k < ITEMS/2 ? 30000 : 2000) * 1ps); sar_get(); end
        @(posedge sar_clk_put); #2ns sar_run = 0; sar_valid_in = 0;
      end
      // lis: run, then stop sending and let the channel drain
      begin
        repeat (3*ITEMS) @(posedge lis_clk1);
        #2ns lis_run = 0; lis_valid_in = 0; lis_stop_pct = 0;
        repeat (40) @(posedge lis_clk2);
      end
    join
    while (q_saf.size() > 0) saf_get();
    while (q_sar.size() > 0) sar_get();
    check(q_mcf.size() == 0 && q_aaf.size() == 0 && q_asf.size() == 0 && q_saf.size() == 0 && q_lis.size() == 0,
          $sformatf("undelivered: mcf %0d aaf %0d asf %0d saf %0d lis %0d",
                    q_mcf.size(), q_aaf.size(), q_asf.size(), q_saf.size(), q_lis.size()));
    check(q_asr.size() == 0 && q_sar.size() == 0,
          $sformatf("undelivered: asr %0d sar %0d", q_asr.size(), q_sar.size()));
    $display("delivered: mcf %0d aaf %0d asf %0d saf %0d lis %0d", n_mcf, n_aaf, n_asf, n_saf, n_lis);
    $display("mcf full %0d empty %0d single %0d | aaf put-wait %0d get-wait %0d | asf put-wait %0d empty %0d | saf full %0d get-wait %0d",
             c_mcf_full, c_mcf_empty, c_mcf_single, c_aaf_put_wait, c_aaf_get_wait, c_asf_put_wait, c_asf_empty, c_saf_full, c_saf_get_wait);
    $display("lis stop_out %0d mcrs stop %0d stop_in %0d invalid %0d", c_lis_stop_out, c_mcrs_stop, c_lis_stop_in, c_lis_invalid);
    $display("delivered: asr %0d sar %0d | asr put-wait %0d stop_in %0d invalid %0d | sar stop_out %0d get-wait %0d",
             n_asr, n_sar, c_asr_put_wait, c_asr_stop_in, c_asr_invalid, c_sar_stop_out, c_sar_get_wait);
    check(c_mcf_full > 0, "mcf full stall");       check(c_mcf_empty > 0, "mcf empty stall");
    check(c_mcf_single > 0, "mcf bi-modal release");
    check(c_aaf_put_wait > 0, "aaf withheld put");  check(c_aaf_get_wait > 0, "aaf withheld get");
    check(c_asf_put_wait > 0, "asf withheld put");  check(c_asf_empty > 0, "asf empty stall");
    check(c_saf_full > 0, "saf full stall");        check(c_saf_get_wait > 0, "saf withheld get");
    check(c_lis_stop_out > 0, "channel back pressure"); check(c_mcrs_stop > 0, "MCRS stop");
    check(c_lis_stop_in > 0, "receiver stop");      check(c_lis_invalid > 0, "invalid packets");
    check(c_asr_put_wait > 0, "asr withheld put");  check(c_asr_stop_in > 0, "asr receiver stop");
    check(c_asr_invalid > 0, "asr invalid packets");
    check(c_sar_stop_out > 0, "sar back pressure"); check(c_sar_get_wait > 0, "sar withheld get");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
