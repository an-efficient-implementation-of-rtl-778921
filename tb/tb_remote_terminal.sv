// tb_remote_terminal: one remote terminal driven and watched at the bus-level.
//
// A behavioural bus driver plays the bus controller and a behavioural decoder watches the
// RT's output. Cases: receive commands (4 and 32 words) whose data must land in the receive
// buffer and be answered by a status word; transmit commands answered by the status word and
// the transmit buffer's words with no gaps; commands for another address (no answer); a data
// word with a parity error (no answer, message error bit set, cleared by the next command);
// a busy RT (status only, busy bit set); service request and terminal flag bits. The
// response gap (4 us of silence, from the end of the last received word to the start of the
// status sync) is checked to within one microsecond.
`timescale 1ns/1ps
module tb_remote_terminal;
  import mil1553_pkg::*;
  import mil1553_tb_pkg::*;

  localparam int N = 4;
  localparam int US = 2 * N;
  localparam int WORD = 40 * N;
  localparam logic [4:0] ADDR = 5'd12;

  logic clk = 0, rst_n = 1;
  logic srv_req_in = 0, busy_in = 0, subsys_flag_in = 0, term_flag_in = 0;
  logic txbuf_wr_en = 0;
  logic [4:0] txbuf_wr_addr = 0, rxbuf_rd_addr = 0;
  word_t txbuf_wr_data = 0, rxbuf_rd_data;
  logic rx_msg_done, tx_msg_done;
  cmd_word_t last_cmd;
  status_word_t status_word;
  bus_t bus_in, bus_out, bc_drv;

  int checks = 0, failures = 0;
  word_t tbuf[32];
  int n_rx_done = 0, n_tx_done = 0;

  assign bus_in = '{pos: bc_drv.pos | bus_out.pos, neg: bc_drv.neg | bus_out.neg};

  remote_terminal #(.HALF_BIT_CLKS(N)) dut (.rt_addr(ADDR), .*);
  mil1553_bfm #(.N(N)) bfm (.clk(clk), .drv(bc_drv), .mon(bus_out));

  always #5 clk = !clk;
  initial #1 rst_n = 0;   // a real falling edge for the asynchronous reset
  always @(posedge clk) begin
    n_rx_done += rx_msg_done;
    n_tx_done += tx_msg_done;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [16:0] cmd(logic [4:0] a, bit tr, logic [4:0] sa, logic [4:0] wc);
    return {1'b1, a, tr, sa, wc};
  endfunction

  // send one message from the "BC" and collect the RT's reply words
  task automatic bc_msg(logic [16:0] words[$], int fault_word, int fault, int n_reply,
                        output mon_word_t reply[$]);
    longint t_end;
    bfm.rx_q = {};
    bfm.send_words(words, fault_word, fault);
    t_end = bfm.cycle;
    repeat (40 * US + n_reply * WORD) @(posedge clk);
    reply = bfm.rx_q;
    check(reply.size() == n_reply, $sformatf("%0d reply words, expected %0d", reply.size(),
                                             n_reply));
    if (reply.size() > 0) begin
      // status ends one word after a 4 us gap (+ up to 1 us for sync detection slack)
      longint gap;
      gap = reply[0].end_cycle - t_end - WORD;
      check(gap >= 4 * US && gap <= 5 * US, $sformatf("response gap %0d cycles", gap));
    end
    for (int i = 1; i < reply.size(); i++)
      check(reply[i].end_cycle - reply[i - 1].end_cycle == WORD, "reply words contiguous");
    repeat (10 * US) @(posedge clk);
  endtask

  task automatic check_status(mon_word_t w, bit me, bit busy, bit srq, bit tf);
    status_word_t s;
    s = status_word_t'(w.data);
    check(w.cs && !w.perr && !w.merr, "status word sync and coding");
    check(s.rt_addr == ADDR && s.msg_err == me && s.busy == busy && s.srv_req == srq &&
          s.term_flag == tf && s.reserved == 0, $sformatf("status word %h", w.data));
  endtask

  initial begin
    mon_word_t r[$];
    logic [16:0] m[$];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      tbuf[i] = 16'($urandom);
      txbuf_wr_en = 1; txbuf_wr_addr = 5'(i); txbuf_wr_data = tbuf[i];
    end
    @(negedge clk) txbuf_wr_en = 0;

    // receive 4 words
    m = '{cmd(ADDR, 0, 5'd1, 5'd4), 17'h01111, 17'h02222, 17'h0BEEF, 17'h0CAFE};
    bc_msg(m, -1, 0, 1, r);
    if (r.size() > 0) check_status(r[0], 0, 0, 0, 0);
    foreach (m[i]) if (i > 0) begin
      rxbuf_rd_addr = 5'(i - 1); #1;
      check(rxbuf_rd_data == m[i][15:0], "receive buffer");
    end
    check(last_cmd == m[0][15:0], "last command");
    check(n_rx_done == 1, "rx_msg_done");

    // transmit 5 words, service request and terminal flag shown in the status
    srv_req_in = 1; term_flag_in = 1;
    m = '{cmd(ADDR, 1, 5'd2, 5'd5)};
    bc_msg(m, -1, 0, 6, r);
    if (r.size() == 6) begin
      check_status(r[0], 0, 0, 1, 1);
      for (int i = 1; i < 6; i++)
        check(!r[i].cs && !r[i].perr && !r[i].merr && r[i].data == tbuf[i - 1], "tx data");
    end
    check(n_tx_done == 1, "tx_msg_done");
    srv_req_in = 0; term_flag_in = 0;

    // another address: no answer
    m = '{cmd(ADDR + 5'd1, 1, 5'd2, 5'd3)};
    bc_msg(m, -1, 0, 0, r);

    // parity error in a data word: no answer, message error remembered
    m = '{cmd(ADDR, 0, 5'd1, 5'd3), 17'h00001, 17'h00002, 17'h00003};
    bc_msg(m, 2, 1, 0, r);
    check(status_word.msg_err == 1, "message error bit set");
    // Manchester error in the command word itself: ignored
    m = '{cmd(ADDR, 1, 5'd1, 5'd3)};
    bc_msg(m, 0, 2, 0, r);
    check(status_word.msg_err == 1, "message error bit kept");

    // busy: status only
    busy_in = 1;
    m = '{cmd(ADDR, 1, 5'd2, 5'd3)};
    bc_msg(m, -1, 0, 1, r);
    if (r.size() > 0) check_status(r[0], 0, 1, 0, 0);
    check(status_word.msg_err == 0, "message error bit cleared");
    busy_in = 0;

    // 32-word receive and transmit (word count 0)
    m = '{cmd(ADDR, 0, 5'd3, 5'd0)};
    for (int i = 0; i < 32; i++) m.push_back({1'b0, 16'($urandom)});
    bc_msg(m, -1, 0, 1, r);
    for (int i = 0; i < 32; i++) begin
      rxbuf_rd_addr = 5'(i); #1;
      check(rxbuf_rd_data == m[i + 1][15:0], "32-word receive");
    end
    m = '{cmd(ADDR, 1, 5'd3, 5'd0)};
    bc_msg(m, -1, 0, 33, r);
    if (r.size() == 33) for (int i = 0; i < 32; i++) check(r[i + 1].data == tbuf[i], "32-word tx");

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
