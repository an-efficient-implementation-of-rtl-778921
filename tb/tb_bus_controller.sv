// tb_bus_controller: the complete bus controller at the bus level.
//
// A behavioural bus driver and decoder play the remote terminal. For each message the
// testbench checks the words the BC puts on the bus (command word fields, data words from
// the transmit buffer, contiguous), then answers 4 us later: with a status word (and data
// words for a transmit command), with nothing, or with a corrupted word. It checks the
// result reported to the host, the number of attempts, the received data, and the time from
// the start request to the command word on the bus.
`timescale 1ns/1ps
module tb_bus_controller;
  import mil1553_pkg::*;
  import mil1553_tb_pkg::*;

  localparam int N = 4;
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
  bus_t bus_in, bus_out, rt_drv;

  int checks = 0, failures = 0;
  word_t tbuf[32];
  int n_ok = 0, n_retry = 0, n_fail = 0;

  assign bus_in = '{pos: bus_out.pos | rt_drv.pos, neg: bus_out.neg | rt_drv.neg};

  bus_controller #(.HALF_BIT_CLKS(N)) dut (.*);
  mil1553_bfm #(.N(N)) bfm (.clk(clk), .drv(rt_drv), .mon(bus_out));

  always #5 clk = !clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  localparam int R_OK = 0, R_NONE = 1, R_PERR = 2;

  task automatic rt_attempt(bit tr, logic [4:0] a, logic [4:0] sa, logic [4:0] wc, int kind);
    int n;
    mon_word_t w;
    logic [16:0] reply[$];
    n = (wc == 0) ? 32 : wc;
    wait (bfm.rx_q.size() > 0);
    w = bfm.rx_q.pop_front();
    check(w.cs && !w.perr && !w.merr && w.data == {a, tr, sa, wc}, "command word on the bus");
    if (!tr) begin
      for (int i = 0; i < n; i++) begin
        longint prev_end;
        prev_end = w.end_cycle;
        wait (bfm.rx_q.size() > 0);
        w = bfm.rx_q.pop_front();
        check(!w.cs && !w.perr && !w.merr && w.data == tbuf[i], "data word on the bus");
        check(w.end_cycle - prev_end == WORD, "data words contiguous");
      end
    end
    repeat (4 * US) @(posedge clk);
    if (kind == R_NONE) return;
    reply.push_back({1'b1, a, 11'b0});
    if (tr) for (int i = 0; i < n; i++) reply.push_back({1'b0, 16'h5A00 ^ 16'(i * 33)});
    bfm.send_words(reply, kind == R_PERR ? reply.size() - 1 : -1, 1);
  endtask

  task automatic message(bit tr, logic [4:0] a, logic [4:0] sa, logic [4:0] wc,
                         int kinds[$], bit exp_ok);
    int n;
    longint t0;
    n = (wc == 0) ? 32 : wc;
    @(negedge clk);
    while (!msg_ready) @(negedge clk);
    bfm.rx_q = {};
    msg_start = 1; msg_tr = tr; msg_rt_addr = a; msg_subaddr = sa; msg_wc = wc;
    t0 = bfm.cycle;
    @(negedge clk);
    msg_start = 0;
    fork
      foreach (kinds[k]) rt_attempt(tr, a, sa, wc, kinds[k]);
      @(posedge msg_done);
    join
    @(negedge clk);
    check(msg_ok == exp_ok && msg_attempts == 3'(kinds.size()),
          $sformatf("outcome ok=%0b attempts=%0d", msg_ok, msg_attempts));
    if (exp_ok && tr)
      for (int i = 0; i < n; i++) begin
        rxbuf_rd_addr = 5'(i); #1;
        check(rxbuf_rd_data == (16'h5A00 ^ 16'(i * 33)), "received data");
      end
    if (exp_ok) n_ok++; else n_fail++;
    if (kinds.size() > 1) n_retry++;
  endtask

  // the command word must appear on the bus 2 cycles after the start request
  longint start_cycle = -1;
  always @(posedge clk) begin
    if (msg_start && msg_ready) start_cycle <= bfm.cycle;
    if (bus_out != BUS_IDLE && start_cycle >= 0) begin
      checks++;
      if (bfm.cycle - start_cycle != 2) begin
        failures++;
        $display("command started %0d cycles after the request", bfm.cycle - start_cycle);
      end
      start_cycle <= -1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      tbuf[i] = 16'($urandom);
      txbuf_wr_en = 1; txbuf_wr_addr = 5'(i); txbuf_wr_data = tbuf[i];
    end
    @(negedge clk) txbuf_wr_en = 0;

    message(0, 5'd2, 5'd1, 5'd4, '{R_OK}, 1);
    message(1, 5'd2, 5'd1, 5'd4, '{R_OK}, 1);
    message(1, 5'd3, 5'd4, 5'd0, '{R_PERR, R_OK}, 1);
    message(0, 5'd1, 5'd4, 5'd0, '{R_NONE, R_PERR, R_OK}, 1);
    message(0, 5'd6, 5'd4, 5'd2, '{R_NONE, R_NONE, R_NONE, R_NONE}, 0);
    check(n_ok == 4 && n_retry == 3 && n_fail == 1, "all cases seen");
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
