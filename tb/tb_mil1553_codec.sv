// tb_mil1553_codec: two encoder/decoder blocks on one bus.
//
// Terminal A sends random back-to-back words, then terminal B answers with its own. Each
// side must receive exactly the other side's words, error-free and in order, and must not
// report the words it sent itself (its receiver is inhibited while it transmits).
`timescale 1ns/1ps
module tb_mil1553_codec;
  import mil1553_pkg::*;

  localparam int N = 4;

  logic clk = 0, rst_n = 1;
  logic     tx_valid[2], tx_ready[2], tx_busy[2], rx_valid[2], rx_active[2];
  tx_word_t tx_word[2];
  rx_word_t rx_word[2];
  bus_t     bout[2], bus;

  int checks = 0, failures = 0;
  tx_word_t exp_q[2][$];
  int got[2] = '{0, 0};

  assign bus = '{pos: bout[0].pos | bout[1].pos, neg: bout[0].neg | bout[1].neg};

  for (genvar i = 0; i < 2; i++) begin : g
    mil1553_codec #(.HALF_BIT_CLKS(N)) u (
      .clk(clk), .rst_n(rst_n), .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]),
      .tx_word(tx_word[i]), .tx_busy(tx_busy[i]), .rx_valid(rx_valid[i]),
      .rx_word(rx_word[i]), .rx_active(rx_active[i]), .bus_in(bus), .bus_out(bout[i]));

    always @(posedge clk) if (rx_valid[i]) begin
      checks++;
      got[i]++;
      if (exp_q[i].size() == 0) begin
        failures++;
        $display("side %0d decoded a word nobody sent to it: %h", i, rx_word[i].data);
      end else begin
        tx_word_t e;
        e = exp_q[i].pop_front();
        if (rx_word[i].perr || rx_word[i].merr || rx_word[i].cs_sync != e.cs_sync ||
            rx_word[i].data != e.data) begin
          failures++;
          $display("side %0d got %h expected %h", i, rx_word[i].data, e.data);
        end
      end
    end
  end

  always #5 clk = !clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  task automatic send(int side, int n);
    for (int w = 0; w < n; w++) begin
      tx_word_t t;
      t = '{cs_sync: (w == 0), data: 16'($urandom)};
      @(negedge clk);
      tx_valid[side] = 1;
      tx_word[side]  = t;
      exp_q[1 - side].push_back(t);
      @(posedge clk);
      while (!tx_ready[side]) @(posedge clk);
      @(negedge clk);
      tx_valid[side] = 0;
    end
    while (tx_busy[side]) @(posedge clk);
  endtask

  initial begin
    tx_valid = '{0, 0};
    tx_word  = '{'0, '0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      send(0, $urandom_range(1, 6));
      repeat (10 * N) @(posedge clk);
      send(1, $urandom_range(1, 6));
      repeat (10 * N) @(posedge clk);
    end
    repeat (50 * N) @(posedge clk);
    checks++;
    if (exp_q[0].size() != 0 || exp_q[1].size() != 0 || got[0] == 0 || got[1] == 0) begin
      failures++;
      $display("words not delivered: %0d %0d", exp_q[0].size(), exp_q[1].size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
