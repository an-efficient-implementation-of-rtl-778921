// tb_manchester_decoder: drives the decoder from a behavioural bus driver and checks every
// word it reports.
//
// Messages of 1 to 5 back-to-back words with random sync types and data are sent with idle
// gaps between them. Some words carry a wrong parity bit or a data bit without its mid-bit
// transition. Each reported word must match the next sent word in sync type, data and the
// parity and Manchester error flags, and no word may be lost or invented. The delay from the
// first sampling of a word's last half bit to `rx_valid` must be N/2 + 3 cycles, and back-to-back words
// must be reported exactly 40*N cycles apart.
`timescale 1ns/1ps
module tb_manchester_decoder;
  import mil1553_pkg::*;

  localparam int N = 4;

  logic     clk = 0;
  logic     rst_n = 1;
  bus_t     bus_in;
  logic     rx_valid;
  rx_word_t rx_word;
  logic     rx_active;
  bus_t     unused_mon;

  int checks = 0, failures = 0;
  typedef struct { bit cs; logic [15:0] d; bit perr; bit merr; } exp_t;
  exp_t exp_q[$];
  longint cycle = 0;
  longint last_half_start[$];
  longint prev_valid = -1;
  int n_perr = 0, n_merr = 0, n_b2b = 0;

  assign unused_mon = '0;

  manchester_decoder #(.HALF_BIT_CLKS(N)) dut (
    .clk(clk), .rst_n(rst_n), .bus_in(bus_in), .rx_valid(rx_valid), .rx_word(rx_word),
    .rx_active(rx_active));

  mil1553_bfm #(.N(N)) bfm (.clk(clk), .drv(bus_in), .mon(unused_mon));

  always #5 clk = !clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rx_valid) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected word %h", rx_word.data);
    end else begin
      e = exp_q.pop_front();
      if (rx_word.cs_sync != e.cs || rx_word.perr != e.perr || rx_word.merr != e.merr ||
          (!e.merr && rx_word.data != e.d)) begin
        failures++;
        $display("got cs=%0b d=%h p=%0b m=%0b expected cs=%0b d=%h p=%0b m=%0b",
                 rx_word.cs_sync, rx_word.data, rx_word.perr, rx_word.merr,
                 e.cs, e.d, e.perr, e.merr);
      end
      checks++;
      if (last_half_start.size() > 0) begin
        longint s;
        s = last_half_start.pop_front();
        // s is two cycles before the half bit is first sampled (see the sender below)
        if (cycle - s != N / 2 + 5) begin
          failures++;
          $display("latency %0d cycles, expected %0d", cycle - s, N / 2 + 5);
        end
      end
    end
    if (prev_valid >= 0 && cycle - prev_valid < 40 * N) begin
      failures++;
      $display("words reported %0d cycles apart", cycle - prev_valid);
    end
    if (prev_valid >= 0 && cycle - prev_valid == 40 * N) n_b2b++;
    prev_valid = cycle;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (20) @(posedge clk);
    for (int m = 0; m < 60; m++) begin
      logic [16:0] words[$];
      int nw, fw, flt;
      longint start;
      nw  = $urandom_range(1, 5);
      fw  = (m % 3 == 2) ? $urandom_range(0, nw - 1) : -1;
      flt = (m % 2 == 0) ? 1 : 2;
      words = {};
      for (int w = 0; w < nw; w++) begin
        exp_t e;
        e.cs = 1'($urandom);
        e.d  = 16'($urandom);
        e.perr = (w == fw && flt == 1);
        e.merr = (w == fw && flt == 2);
        n_perr += e.perr;
        n_merr += e.merr;
        exp_q.push_back(e);
        words.push_back({e.cs, e.d});
      end
      // `start` is read before this edge's counter update, and the driver sets the first
      // level at the next falling edge: the decoder first samples it two counts later.
      @(posedge clk);
      start = cycle;
      for (int w = 0; w < nw; w++) last_half_start.push_back(start + 40 * N * w + 39 * N);
      bfm.send_words(words, fw, flt);
      repeat ($urandom_range(4 * N, 30 * N)) @(posedge clk);
    end
    repeat (100 * N) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_perr == 0 || n_merr == 0 || n_b2b == 0) begin
      failures++;
      $display("left %0d perr %0d merr %0d b2b %0d", exp_q.size(), n_perr, n_merr, n_b2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
