// bc_protocol_controller: message sequencer of the MIL-STD-1553B bus controller.
//
// On a request from the host (T/R, RT address, subaddress, word count) it frames the 16-bit
// command word and runs one of the two message formats the paper implements:
//   BC to RT (T/R = 0): command word followed, with no gap, by the data words, which the host
//     has placed in the transmit buffer; then wait for the RT's status word.
//   RT to BC (T/R = 1): command word alone; then wait for the RT's status word and the data
//     words that follow it, which go to the receive buffer.
// A response is valid when every word arrives free of parity and Manchester errors, with the
// right sync, the status word carries the commanded RT address and neither its message error
// nor its busy bit, and no gap longer than the response timeout opens before a word. If the
// response is not valid the message is sent again, up to MAX_RETRIES more times, as in the
// document's flow (command framing, encoding, wait for RT response, repeat 3 times). The word
// count field 0 stands for 32 words.
//
// This design's own choices: the two 32-word buffers and their host ports, the handshake with
// the host, the timeout value (14 us, the standard's no-response time, counted while the bus
// is silent), the intermessage gap (4 us of silent bus) kept after every attempt, and
// treating busy and message error as an invalid response.
//
// Interface: `msg_start` is taken when `msg_ready` is high. `msg_done` pulses once per
// message with `msg_ok`, the number of attempts made and the last status word received.
// Host ports write the transmit buffer and read the receive buffer (combinational read).
// Codec ports connect to mil1553_codec.
module bc_protocol_controller
  import mil1553_pkg::*;
#(
  parameter int unsigned HALF_BIT_CLKS   = 8,
  parameter int unsigned MAX_RETRIES     = 3,
  parameter int unsigned RESP_TIMEOUT_US = 14,
  parameter int unsigned GAP_US          = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  // host request
  input  logic         msg_start,
  output logic         msg_ready,
  input  logic         msg_tr,
  input  logic [4:0]   msg_rt_addr,
  input  logic [4:0]   msg_subaddr,
  input  logic [4:0]   msg_wc,
  // host result
  output logic         msg_done,
  output logic         msg_ok,
  output logic [2:0]   msg_attempts,
  output status_word_t msg_status,
  output word_t        cmd_word,
  // host buffers
  input  logic         txbuf_wr_en,
  input  logic [4:0]   txbuf_wr_addr,
  input  word_t        txbuf_wr_data,
  input  logic [4:0]   rxbuf_rd_addr,
  output word_t        rxbuf_rd_data,
  // codec
  output logic         tx_valid,
  input  logic         tx_ready,
  output tx_word_t     tx_word,
  input  logic         tx_busy,
  input  logic         rx_valid,
  input  rx_word_t     rx_word,
  input  logic         rx_active
);

  localparam int unsigned US_CLKS      = 2 * HALF_BIT_CLKS;
  localparam int unsigned TIMEOUT_CLKS = RESP_TIMEOUT_US * US_CLKS;
  localparam int unsigned GAP_CLKS     = GAP_US * US_CLKS;
  localparam int unsigned TW = $clog2(((TIMEOUT_CLKS > GAP_CLKS) ? TIMEOUT_CLKS : GAP_CLKS) + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_GAP, S_CMD, S_DATA_TX, S_WAIT_STATUS, S_WAIT_DATA
  } state_e;

  state_e       state;
  cmd_word_t    cmd;
  logic [5:0]   n_words;
  logic [5:0]   idx;
  logic [TW-1:0] timer;
  logic         retry_pending;
  logic [2:0]   attempts;

  word_t txbuf [MAX_WORDS];
  word_t rxbuf [MAX_WORDS];

  status_word_t rx_status;
  logic         word_clean;
  logic         status_good;
  logic         timed_out;
  logic         fail;
  logic         succeed;

  assign rx_status   = status_word_t'(rx_word.data);
  assign word_clean  = rx_valid && !rx_word.perr && !rx_word.merr;
  assign status_good = word_clean && rx_word.cs_sync && (rx_status.rt_addr == cmd.rt_addr) &&
                       !rx_status.msg_err && !rx_status.busy;
  assign timed_out   = (timer == TW'(TIMEOUT_CLKS));

  // Outcome of the current attempt, decided in the two waiting states.
  always_comb begin
    fail    = 1'b0;
    succeed = 1'b0;
    unique case (state)
      S_WAIT_STATUS: begin
        if (rx_valid) begin
          if (!status_good)            fail    = 1'b1;
          else if (!cmd.tr)            succeed = 1'b1;
        end else if (timed_out) begin
          fail = 1'b1;
        end
      end
      S_WAIT_DATA: begin
        if (rx_valid) begin
          if (!word_clean || rx_word.cs_sync) fail    = 1'b1;
          else if (idx == n_words - 6'd1)     succeed = 1'b1;
        end else if (timed_out) begin
          fail = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_comb begin
    tx_valid = 1'b0;
    tx_word  = '0;
    if (state == S_CMD) begin
      tx_valid = 1'b1;
      tx_word  = '{cs_sync: 1'b1, data: word_t'(cmd)};
    end else if (state == S_DATA_TX) begin
      tx_valid = 1'b1;
      tx_word  = '{cs_sync: 1'b0, data: txbuf[idx[4:0]]};
    end
  end

  assign msg_ready     = (state == S_IDLE);
  assign msg_attempts  = attempts;
  assign cmd_word      = word_t'(cmd);
  assign rxbuf_rd_data = rxbuf[rxbuf_rd_addr];

  always_ff @(posedge clk) begin
    if (txbuf_wr_en) txbuf[txbuf_wr_addr] <= txbuf_wr_data;
    if (state == S_WAIT_DATA && word_clean && !rx_word.cs_sync)
      rxbuf[idx[4:0]] <= rx_word.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      cmd           <= '0;
      n_words       <= '0;
      idx           <= '0;
      timer         <= '0;
      retry_pending <= 1'b0;
      attempts      <= '0;
      msg_done      <= 1'b0;
      msg_ok        <= 1'b0;
      msg_status    <= '0;
    end else begin
      msg_done <= 1'b0;

      // response timer: runs only while the bus is silent and nothing is being sent
      if (tx_valid || tx_busy || rx_active || rx_valid || state == S_IDLE) timer <= '0;
      else if (!timed_out)                                                 timer <= timer + TW'(1);

      if (state == S_WAIT_STATUS && rx_valid) msg_status <= rx_status;

      unique case (state)
        S_IDLE: begin
          if (msg_start) begin
            cmd           <= '{rt_addr: msg_rt_addr, tr: msg_tr, subaddr: msg_subaddr,
                               wc: msg_wc};
            n_words       <= word_count(msg_wc);
            attempts      <= 3'd1;
            retry_pending <= 1'b0;
            state         <= S_CMD;
          end
        end
        S_CMD: begin
          if (tx_ready) begin
            idx   <= '0;
            state <= cmd.tr ? S_WAIT_STATUS : S_DATA_TX;
          end
        end
        S_DATA_TX: begin
          if (tx_ready) begin
            if (idx == n_words - 6'd1) state <= S_WAIT_STATUS;
            else                       idx   <= idx + 6'd1;
          end
        end
        S_WAIT_STATUS: begin
          if (rx_valid && status_good && cmd.tr) begin
            idx   <= '0;
            state <= S_WAIT_DATA;
          end
        end
        S_WAIT_DATA: begin
          if (rx_valid && !fail && !succeed) idx <= idx + 6'd1;
        end
        S_GAP: begin
          if (timer >= TW'(GAP_CLKS)) begin
            if (retry_pending) begin
              retry_pending <= 1'b0;
              attempts      <= attempts + 3'd1;
              state         <= S_CMD;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase

      if (succeed) begin
        msg_done <= 1'b1;
        msg_ok   <= 1'b1;
        state    <= S_GAP;
      end else if (fail) begin
        state <= S_GAP;
        if (attempts <= 3'(MAX_RETRIES)) begin
          retry_pending <= 1'b1;
        end else begin
          msg_done <= 1'b1;
          msg_ok   <= 1'b0;
        end
      end
    end
  end

  // A message ends only while a response is being checked.
  assert property (@(posedge clk) disable iff (!rst_n) msg_done |-> $past(state == S_WAIT_STATUS || state == S_WAIT_DATA))
    else $error("msg_done outside a response check");

  initial begin
    assert (MAX_RETRIES <= 6) else $error("attempt counter holds at most 7 attempts");
  end

endmodule
