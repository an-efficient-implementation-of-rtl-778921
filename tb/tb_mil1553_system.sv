// tb_mil1553_system: end-to-end test of the bus controller with three remote terminals,
// at the design's default parameters (16 MHz clock, 1 Mbit/s bus).
//
// It runs the two message formats of the design and its error handling:
//   - BC to RT2 and RT2 to BC with 4 data words (address 2, subaddress 1, word count 4);
//   - 32-word messages (word count 0) to RT1 and from RT3;
//   - a command word damaged on the bus by an outside driver: the RT ignores it, the BC
//     times out and sends the message again;
//   - a data word damaged on its way from the RT: the BC retries;
//   - a busy RT: the BC treats the answer as invalid and gives up after three retries;
//   - an address with no RT: four attempts, then failure.
// Data must arrive unchanged in the receiving buffer, only the addressed RT may answer,
// the BC's result (ok flag, attempts, status word) must match, and a 4-word BC-to-RT message
// must take 124 us (5 words, 4 us response gap, status word) to within 2 us. Each mechanism
// is counted and must occur at least once.
`timescale 1ns/1ps
module tb_mil1553_system;
  import mil1553_pkg::*;

  localparam int NUM_RT = 3;
  localparam int N = 8;              // the design's default clocks per half bit
  localparam int US = 2 * N;

  logic clk = 0, rst_n = 1;
  logic msg_start = 0, msg_ready, msg_tr = 0;
  logic [4:0] msg_rt_addr = 0, msg_subaddr = 0, msg_wc = 0;
  logic msg_done, msg_ok;
  logic [2:0] msg_attempts;
  status_word_t msg_status;
  word_t cmd_word;
  logic bc_txbuf_wr_en = 0;
  logic [4:0] bc_txbuf_wr_addr = 0, bc_rxbuf_rd_addr = 0;
  word_t bc_txbuf_wr_data = 0, bc_rxbuf_rd_data;
  logic rt_srv_req[NUM_RT], rt_busy[NUM_RT], rt_subsys_flag[NUM_RT], rt_term_flag[NUM_RT];
  logic rt_txbuf_wr_en[NUM_RT];
  logic [4:0] rt_txbuf_wr_addr[NUM_RT], rt_rxbuf_rd_addr[NUM_RT];
  word_t rt_txbuf_wr_data[NUM_RT], rt_rxbuf_rd_data[NUM_RT];
  logic rt_rx_msg_done[NUM_RT], rt_tx_msg_done[NUM_RT];
  cmd_word_t rt_last_cmd[NUM_RT];
  status_word_t rt_status_word[NUM_RT];
  bus_t ext_bus = '0, bus;
  logic collision;

  int checks = 0, failures = 0;
  word_t bc_data[32];
  word_t rt_data[NUM_RT][32];
  int rx_done_cnt[NUM_RT], tx_done_cnt[NUM_RT];
  longint cycle = 0;
  int n_collision_cycles = 0;

  // mechanism counters
  int m_bc2rt = 0, m_rt2bc = 0, m_32words = 0, m_retry_ok = 0, m_timeout = 0,
      m_gave_up = 0, m_busy = 0, m_parity = 0;

  mil1553_system dut (.*);

  always #31.25 clk = !clk;   // 16 MHz
  initial #1 rst_n = 0;       // a real falling edge for the asynchronous reset

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (collision) n_collision_cycles++;
    for (int i = 0; i < NUM_RT; i++) begin
      rx_done_cnt[i] += rt_rx_msg_done[i];
      tx_done_cnt[i] += rt_tx_msg_done[i];
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Start a message, optionally corrupt the bus once during the word with index
  // `corrupt_word` of the message (counting every word on the bus), and wait for the result.
  task automatic message(bit tr, logic [4:0] a, logic [4:0] sa, logic [4:0] wc,
                         int corrupt_word, output longint dur);
    longint t0;
    @(negedge clk);
    while (!msg_ready) @(negedge clk);
    msg_start = 1; msg_tr = tr; msg_rt_addr = a; msg_subaddr = sa; msg_wc = wc;
    t0 = cycle;
    @(negedge clk);
    msg_start = 0;
    fork
      begin
        if (corrupt_word >= 0) begin
          int seen;
          seen = 0;
          // count word starts: each word is 20 us, words of a reply follow without a gap
          while (bus == BUS_IDLE) @(negedge clk);
          repeat (corrupt_word) begin
            repeat (20 * US) @(negedge clk);
            while (bus == BUS_IDLE) @(negedge clk);
          end
          repeat (10 * US) @(negedge clk);
          ext_bus = '{pos: 1'b1, neg: 1'b1};
          repeat (N) @(negedge clk);
          ext_bus = BUS_IDLE;
        end
      end
      @(posedge msg_done);
    join
    dur = cycle - t0;
    @(negedge clk);
  endtask

  task automatic counts_snapshot(output int rx[NUM_RT], output int tx[NUM_RT]);
    rx = rx_done_cnt;
    tx = tx_done_cnt;
  endtask

  initial begin
    longint dur;
    int rx0[NUM_RT], tx0[NUM_RT];
    for (int i = 0; i < NUM_RT; i++) begin
      rt_srv_req[i] = 0; rt_busy[i] = 0; rt_subsys_flag[i] = 0; rt_term_flag[i] = 0;
      rt_txbuf_wr_en[i] = 0; rt_txbuf_wr_addr[i] = 0; rt_txbuf_wr_data[i] = 0;
      rt_rxbuf_rd_addr[i] = 0; rx_done_cnt[i] = 0; tx_done_cnt[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // fill the buffers
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      bc_data[k] = 16'($urandom);
      bc_txbuf_wr_en = 1; bc_txbuf_wr_addr = 5'(k); bc_txbuf_wr_data = bc_data[k];
      for (int i = 0; i < NUM_RT; i++) begin
        rt_data[i][k] = 16'($urandom);
        rt_txbuf_wr_en[i] = 1; rt_txbuf_wr_addr[i] = 5'(k); rt_txbuf_wr_data[i] = rt_data[i][k];
      end
    end
    @(negedge clk);
    bc_txbuf_wr_en = 0;
    for (int i = 0; i < NUM_RT; i++) rt_txbuf_wr_en[i] = 0;

    // 1. BC to RT2, 4 words
    counts_snapshot(rx0, tx0);
    message(0, 5'd2, 5'd1, 5'd4, -1, dur);
    check(msg_ok && msg_attempts == 1 && msg_status.rt_addr == 2, "BC to RT2 result");
    check(rx_done_cnt[1] == rx0[1] + 1 && rx_done_cnt[0] == rx0[0] && rx_done_cnt[2] == rx0[2],
          "only RT2 received");
    for (int k = 0; k < 4; k++) begin
      rt_rxbuf_rd_addr[1] = 5'(k); #1;
      check(rt_rxbuf_rd_data[1] == bc_data[k], "RT2 receive buffer");
    end
    check(rt_last_cmd[1] == cmd_word_t'({5'd2, 1'b0, 5'd1, 5'd4}), "RT2 saw the command word");
    check(dur >= 123 * US && dur <= 126 * US, $sformatf("BC to RT message took %0d cycles", dur));
    m_bc2rt++;

    // 2. RT2 to BC, 4 words
    message(1, 5'd2, 5'd1, 5'd4, -1, dur);
    check(msg_ok && msg_attempts == 1, "RT2 to BC result");
    for (int k = 0; k < 4; k++) begin
      bc_rxbuf_rd_addr = 5'(k); #1;
      check(bc_rxbuf_rd_data == rt_data[1][k], "BC receive buffer from RT2");
    end
    m_rt2bc++;

    // 3. 32 words to RT1 and from RT3
    message(0, 5'd1, 5'd5, 5'd0, -1, dur);
    check(msg_ok && msg_attempts == 1, "32 words to RT1");
    for (int k = 0; k < 32; k++) begin
      rt_rxbuf_rd_addr[0] = 5'(k); #1;
      check(rt_rxbuf_rd_data[0] == bc_data[k], "RT1 receive buffer");
    end
    message(1, 5'd3, 5'd5, 5'd0, -1, dur);
    check(msg_ok && msg_attempts == 1, "32 words from RT3");
    for (int k = 0; k < 32; k++) begin
      bc_rxbuf_rd_addr = 5'(k); #1;
      check(bc_rxbuf_rd_data == rt_data[2][k], "BC receive buffer from RT3");
    end
    m_32words += 2;
    m_bc2rt++;
    m_rt2bc++;

    // 4. command word hit by noise: no answer, timeout, retry succeeds
    counts_snapshot(rx0, tx0);
    message(0, 5'd3, 5'd2, 5'd3, 0, dur);
    check(msg_ok && msg_attempts == 2, $sformatf("retry after damaged command (%0d)", msg_attempts));
    check(rx_done_cnt[2] == rx0[2] + 1, "RT3 took the message once");
    if (msg_ok && msg_attempts == 2) begin m_retry_ok++; m_timeout++; end

    // 5. a data word from RT1 damaged: parity/Manchester error seen by the BC, retry succeeds
    message(1, 5'd1, 5'd2, 5'd6, 3, dur);
    check(msg_ok && msg_attempts == 2, $sformatf("retry after damaged data (%0d)", msg_attempts));
    for (int k = 0; k < 6; k++) begin
      bc_rxbuf_rd_addr = 5'(k); #1;
      check(bc_rxbuf_rd_data == rt_data[0][k], "BC receive buffer after retry");
    end
    if (msg_ok && msg_attempts == 2) begin m_retry_ok++; m_parity++; end

    // 6. RT2 busy: status only, BC retries three times, then gives up
    rt_busy[1] = 1;
    message(1, 5'd2, 5'd1, 5'd2, -1, dur);
    check(!msg_ok && msg_attempts == 4 && msg_status.busy, "busy RT");
    if (!msg_ok && msg_status.busy) begin m_busy++; m_gave_up++; end
    rt_busy[1] = 0;

    // 7. no RT at address 9
    message(0, 5'd9, 5'd1, 5'd1, -1, dur);
    check(!msg_ok && msg_attempts == 4, "no RT at the address");
    if (!msg_ok && msg_attempts == 4) begin m_gave_up++; m_timeout++; end

    // 8. the system still works afterwards
    message(0, 5'd2, 5'd1, 5'd4, -1, dur);
    check(msg_ok && msg_attempts == 1, "normal message after errors");

    $display("mechanisms: bc2rt=%0d rt2bc=%0d 32words=%0d retry_ok=%0d timeout=%0d parity=%0d busy=%0d gave_up=%0d collision_cycles=%0d",
             m_bc2rt, m_rt2bc, m_32words, m_retry_ok, m_timeout, m_parity, m_busy, m_gave_up,
             n_collision_cycles);
    check(m_bc2rt > 0, "BC to RT happened");
    check(m_rt2bc > 0, "RT to BC happened");
    check(m_32words > 0, "32-word message happened");
    check(m_retry_ok > 0, "successful retry happened");
    check(m_timeout > 0, "response timeout happened");
    check(m_parity > 0, "damaged received word happened");
    check(m_busy > 0, "busy answer happened");
    check(m_gave_up > 0, "retries exhausted happened");
    check(n_collision_cycles == 2 * N, "collisions only from injected noise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
