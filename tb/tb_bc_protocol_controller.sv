// tb_bc_protocol_controller: the BC message sequencer against a word-level model of the
// encoder/decoder and of a remote terminal.
//
// The encoder model accepts a word, stays busy 40*N cycles and is ready again on its last
// busy cycle, like the real encoder. The testbench plays the RT at word level: it checks the
// command word (address, T/R, subaddress, word count) and the data words the controller
// sends, then answers in one of several ways per attempt: correctly, not at all, with a
// wrong address, a parity error, a busy bit or a missing data word. It checks the outcome
// (ok flag, number of attempts, received data in the receive buffer) and the time the
// controller waits before a retry after no response: the 14 us timeout, which also serves as
// the 4 us intermessage gap.
`timescale 1ns/1ps
module tb_bc_protocol_controller;
  import mil1553_pkg::*;

  localparam int N = 2;
  localparam int US = 2 * N;
  localparam int WORD = 40 * N;

  logic clk = 0, rst_n = 1;
  logic msg_start = 0, msg_ready, msg_tr = 0;
  logic [4:0] msg_rt_addr = 0, msg_subaddr = 0, msg_wc = 0;
  logic msg_done, msg_ok;
  logic [2:0] msg_attempts;
  status_word_t msg_status;
  word_t cmd_word;
  logic txbuf_wr_en = 0;
  logic [4:0] txbuf_wr_addr = 0, rxbuf_rd_addr = 0;
  word_t txbuf_wr_data = 0, rxbuf_rd_data;
  logic tx_valid, tx_ready, tx_busy;
  tx_word_t tx_word;
  logic rx_valid = 0, rx_active = 0;
  rx_word_t rx_word = '0;

  int checks = 0, failures = 0;
  int rem = 0;
  tx_word_t sent_q[$];
  longint cycle = 0;
  longint tx_end_cycle = 0, cmd_cycle[$];
  word_t tbuf[32];
  int n_retry_seen = 0, n_timeout = 0, n_bc2rt = 0, n_rt2bc = 0;

  bc_protocol_controller #(.HALF_BIT_CLKS(N)) dut (.*);

  always #5 clk = !clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  // encoder model
  assign tx_busy  = rem > 0;
  assign tx_ready = rem <= 1;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (tx_valid && tx_ready) begin
      sent_q.push_back(tx_word);
      if (tx_word.cs_sync) cmd_cycle.push_back(cycle);
      rem <= WORD;
    end else if (rem > 0) begin
      rem <= rem - 1;
      if (rem == 1) tx_end_cycle <= cycle;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic rx_send(bit cs, word_t d, bit perr = 0);
    @(negedge clk);
    rx_active = 1;
    repeat (20) @(negedge clk);
    rx_active = 0;
    rx_valid  = 1;
    rx_word   = '{cs_sync: cs, data: d, perr: perr, merr: 0};
    @(negedge clk);
    rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  // respond kinds
  localparam int R_OK = 0, R_NONE = 1, R_ADDR = 2, R_PERR = 3, R_BUSY = 4, R_SHORT = 5;

  // Wait for one attempt of the current message, check what the BC sent, then respond.
  task automatic attempt(bit tr, logic [4:0] a, logic [4:0] sa, logic [4:0] wc, int kind);
    int n;
    tx_word_t c;
    status_word_t st;
    n = (wc == 0) ? 32 : wc;
    wait (sent_q.size() > 0);
    c = sent_q.pop_front();
    check(c.cs_sync && c.data == {a, tr, sa, wc}, "command word");
    check(cmd_word == {a, tr, sa, wc}, "cmd_word output");
    if (!tr) begin
      for (int i = 0; i < n; i++) begin
        wait (sent_q.size() > 0);
        c = sent_q.pop_front();
        check(!c.cs_sync && c.data == tbuf[i], $sformatf("data word %0d", i));
      end
    end
    @(posedge clk);
    wait (!tx_busy);
    repeat (3) @(negedge clk);
    check(sent_q.size() == 0, "no extra words");
    st = '0;
    st.rt_addr = a;
    case (kind)
      R_NONE: ;
      R_ADDR: begin st.rt_addr = a ^ 5'd1; rx_send(1, st); end
      R_BUSY: begin st.busy = 1; rx_send(1, st); end
      default: begin
        rx_send(1, st, kind == R_PERR && !tr);
        if (tr) begin
          for (int i = 0; i < n; i++) begin
            if (kind == R_SHORT && i == n - 1) break;
            rx_send(0, 16'hA000 + 16'(i * 7) + 16'(a), kind == R_PERR && i == 1);
          end
        end
      end
    endcase
  endtask

  task automatic message(bit tr, logic [4:0] a, logic [4:0] sa, logic [4:0] wc,
                         int kinds[$], bit exp_ok);
    int n;
    n = (wc == 0) ? 32 : wc;
    @(negedge clk);
    while (!msg_ready) @(negedge clk);
    msg_start = 1; msg_tr = tr; msg_rt_addr = a; msg_subaddr = sa; msg_wc = wc;
    @(negedge clk);
    msg_start = 0;
    fork
      begin
        foreach (kinds[k]) attempt(tr, a, sa, wc, kinds[k]);
      end
      begin
        @(posedge msg_done);
      end
    join
    @(negedge clk);
    check(msg_ok == exp_ok, "msg_ok");
    check(msg_attempts == 3'(kinds.size()), $sformatf("attempts %0d", msg_attempts));
    if (kinds.size() > 1) n_retry_seen++;
    if (exp_ok && tr) begin
      for (int i = 0; i < n; i++) begin
        rxbuf_rd_addr = 5'(i);
        #1;
        check(rxbuf_rd_data == 16'hA000 + 16'(i * 7) + 16'(a), $sformatf("rx buffer %0d", i));
      end
      n_rt2bc++;
    end
    if (exp_ok && !tr) n_bc2rt++;
    if (exp_ok) check(msg_status.rt_addr == a, "status word kept");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      tbuf[i] = 16'($urandom);
      txbuf_wr_en = 1; txbuf_wr_addr = 5'(i); txbuf_wr_data = tbuf[i];
    end
    @(negedge clk) txbuf_wr_en = 0;

    message(0, 5'd2, 5'd1, 5'd4, '{R_OK}, 1);                 // BC to RT, 4 words
    message(1, 5'd2, 5'd1, 5'd4, '{R_OK}, 1);                 // RT to BC, 4 words
    message(0, 5'd7, 5'd3, 5'd0, '{R_OK}, 1);                 // 32 words
    message(1, 5'd9, 5'd3, 5'd0, '{R_OK}, 1);
    message(0, 5'd3, 5'd2, 5'd2, '{R_ADDR, R_OK}, 1);         // invalid, then valid
    message(1, 5'd3, 5'd2, 5'd5, '{R_PERR, R_SHORT, R_OK}, 1);
    message(0, 5'd4, 5'd2, 5'd1, '{R_BUSY, R_PERR, R_OK}, 1);
    // no response at all: four attempts, then failure
    cmd_cycle = {};
    message(0, 5'd5, 5'd2, 5'd1, '{R_NONE, R_NONE, R_NONE, R_NONE}, 0);
    check(cmd_cycle.size() == 4, "four command words sent");
    for (int k = 1; k < cmd_cycle.size(); k++) begin
      longint d;
      d = cmd_cycle[k] - cmd_cycle[k - 1];
      // two words on the bus, then 14 us of silence; that silence already covers the
      // 4 us gap, so the retry follows the timeout within a few cycles
      check(d >= 2 * WORD + 14 * US && d <= 2 * WORD + 14 * US + 4,
            $sformatf("retry spacing %0d cycles", d));
      n_timeout++;
    end
    check(n_retry_seen > 0 && n_timeout > 0 && n_bc2rt > 0 && n_rt2bc > 0, "all cases seen");
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
