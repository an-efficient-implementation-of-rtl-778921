// tb_manchester_encoder: checks the Manchester encoder cycle by cycle.
//
// Random words with random sync types are offered, some back to back and some after idle
// time. For every accepted word the testbench appends the expected bus levels, worked out
// here from the word format (3 half bits high then 3 low for a command/status sync, the
// reverse for data sync, 1 = high-low, 0 = low-high, odd parity), N cycles per half bit,
// starting the cycle after the handshake. Every cycle the bus is compared with that
// schedule, or with an idle bus when nothing is scheduled, which also checks that
// back-to-back words follow with no gap and that a word lasts 40*N cycles.
`timescale 1ns/1ps
module tb_manchester_encoder;
  import mil1553_pkg::*;

  localparam int N = 4;

  logic     clk = 0;
  logic     rst_n = 1;
  logic     tx_valid = 0;
  logic     tx_ready;
  tx_word_t tx_word = '0;
  bus_t     bus_out;
  logic     busy;

  int checks = 0, failures = 0;
  int exp_q[$];     // 1 = pos, -1 = neg, per cycle
  int words_sent = 0;
  int b2b = 0;

  manchester_encoder #(.HALF_BIT_CLKS(N)) dut (.*);

  always #5 clk = !clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  function automatic void schedule(tx_word_t w);
    int ones = 0;
    int halves[$];
    for (int i = 0; i < 3; i++) halves.push_back(w.cs_sync ? 1 : -1);
    for (int i = 0; i < 3; i++) halves.push_back(w.cs_sync ? -1 : 1);
    for (int i = 15; i >= 0; i--) begin
      ones += w.data[i];
      halves.push_back(w.data[i] ? 1 : -1);
      halves.push_back(w.data[i] ? -1 : 1);
    end
    // odd parity bit
    halves.push_back((ones % 2 == 0) ? 1 : -1);
    halves.push_back((ones % 2 == 0) ? -1 : 1);
    foreach (halves[h]) repeat (N) exp_q.push_back(halves[h]);
  endfunction

  // checker on the falling edge: compare this cycle, then note a handshake for the next edge
  always @(negedge clk) if (rst_n) begin
    int e;
    int got;
    e   = (exp_q.size() > 0) ? exp_q.pop_front() : 0;
    got = (bus_out.pos && !bus_out.neg) ? 1 : (bus_out.neg && !bus_out.pos) ? -1 :
          (bus_out.pos || bus_out.neg) ? 2 : 0;
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("mismatch at %0t: bus %0d expected %0d", $time, got, e);
    end
    if ((e != 0) != busy) begin
      failures++;
      if (failures < 10) $display("busy wrong at %0t", $time);
    end
    if (tx_valid && tx_ready) begin
      if (exp_q.size() > 0) begin
        failures++;
        $display("word accepted %0d cycles before the previous one ended", exp_q.size());
      end
      if (e != 0) b2b++;
      schedule(tx_word);
      words_sent++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int m = 0; m < 40; m++) begin
      @(posedge clk); #1;
      tx_valid = 1;
      tx_word  = '{cs_sync: 1'($urandom), data: 16'($urandom)};
      if (m == 0) tx_word.data = 16'h0000;
      if (m == 1) tx_word.data = 16'hFFFF;
      do @(posedge clk); while (!(tx_valid && tx_ready) || $time == 0);
      #1 tx_valid = 0;
      // idle for a while every fourth word, otherwise offer the next at once
      if (m % 4 == 3) repeat ($urandom_range(1, 3 * N * 40)) @(posedge clk);
    end
    wait (exp_q.size() == 0);
    repeat (2 * N) @(posedge clk);
    checks++;
    if (words_sent != 40 || b2b < 20) begin
      failures++;
      $display("words %0d back-to-back %0d", words_sent, b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
