// tb_relay_station: self-checking testbench of relay_station.
//
// A sender presents a packet every cycle (valid about 3 times in 4) and
// holds it while stop_out is high; a receiver raises stop_in at random.
// Checks: the valid packets arrive in order, none lost or duplicated; with
// no back pressure a packet reaches the output one cycle after it is
// taken; stop_out is stop_in delayed by one cycle; when stopped, the extra
// packet goes into AR and leaves right after the MR packet.  Counts stop
// episodes (AR used) and invalid packets passed; both must occur.
`timescale 1ns/1ps
module tb_relay_station;
  localparam int unsigned W = 8;
  logic clk = 0, rst_n = 1;
  initial #1ns rst_n = 0;
  logic valid_in = 0, stop_in = 0;
  logic [W-1:0] data_in = '0;
  logic stop_out, valid_out;
  logic [W-1:0] data_out;
  always #5ns clk = ~clk;

  relay_station #(.W(W)) dut (.*);

  int checks = 0, failures = 0, n_stop = 0, n_invalid = 0, n_recv = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] seq = 8'h10;
  logic prev_stop_in = 0;
  bit hold = 0, stop_phase;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #12ns rst_n = 1;
    @(negedge clk);
    check(!valid_out && !stop_out, "reset state");
    // ---- latency without back pressure
    valid_in = 1; data_in = 8'hC3; stop_in = 0;
    @(negedge clk); valid_in = 0;
    check(valid_out && data_out == 8'hC3, "packet out one cycle after it was taken");
    @(negedge clk);
    check(!valid_out, "invalid packet follows");
    // ---- random traffic
    for (int k = 0; k < 2000; k++) begin
      stop_phase = (k % 200) < 100;
      if (!hold) begin
        valid_in = ($urandom % 4) != 0; data_in = seq;
      end
      stop_in = stop_phase ? (($urandom % 3) == 0) : 1'b0;
      #1ns;
      // stop_out must equal last cycle's stop_in
      check(stop_out == prev_stop_in, "stop_out is stop_in one cycle late");
      if (stop_out && !prev_stop_in) ; // unreachable, covered by check
      if (!stop_out) begin
        if (valid_in) begin model.push_back(data_in); seq++; end
        hold = 0;
      end else hold = 1;
      if (stop_out) n_stop++;
      if (!stop_in) begin
        if (valid_out) begin
          check(model.size() > 0, "packet from nowhere");
          if (model.size() > 0) check(data_out == model.pop_front(), "order");
          n_recv++;
        end else n_invalid++;
      end
      prev_stop_in = stop_in;
      @(negedge clk);
    end
    stop_in = 0; valid_in = 0; hold = 0;
    repeat (4) begin
      #1ns if (valid_out) begin
        check(model.size() > 0 && data_out == model.pop_front(), "drain order");
      end
      @(negedge clk);
    end
    check(model.size() == 0, "all packets delivered");
    $display("received %0d, stopped cycles %0d, invalid packets %0d", n_recv, n_stop, n_invalid);
    check(n_stop > 0, "back pressure occurred");
    check(n_invalid > 0, "invalid packets passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
