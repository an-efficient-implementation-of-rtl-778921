// remote_terminal: a MIL-STD-1553B remote terminal (RT) serving BC-to-RT and RT-to-BC messages.
//
// The RT listens through its own encoder/decoder block. A command word (command/status sync,
// no parity or Manchester error) carrying this RT's address starts a message:
//   receive command (T/R = 0): the RT takes the number of data words the word count names
//     (0 = 32) into its receive buffer, then answers with its status word;
//   transmit command (T/R = 1): the RT answers with its status word followed, with no gap, by
//     that many data words from its transmit buffer (only the status word when busy).
// The answer starts after a fixed response gap of RESP_GAP_US of silent bus. A data word
// with an error, a command word in place of a data word, or a pause longer than
// WORD_TIMEOUT_US inside the received data ends the message with no answer and sets the
// message error bit kept in `status_word`; the next valid command clears it. Commands for other
// addresses and damaged words are ignored.
//
// The paper describes the RT's behaviour (validate the command, receive or send data
// words, answer with a status word) and uses three such RTs to exercise the bus controller;
// the buffers, subsystem ports, response gap, error handling and the use of one buffer for
// every subaddress are this design's own. Broadcast commands and mode codes are not handled.
//
// Interface: `rt_addr` is the terminal's address (static). The subsystem writes the transmit
// buffer, reads the receive buffer, drives the service request, busy, subsystem flag and
// terminal flag bits of the status word, and sees `rx_msg_done` / `tx_msg_done` pulse at the
// end of each completed message, with `last_cmd` holding the command word.
module remote_terminal
  import mil1553_pkg::*;
#(
  parameter int unsigned HALF_BIT_CLKS   = 8,
  parameter int unsigned RESP_GAP_US     = 4,
  parameter int unsigned WORD_TIMEOUT_US = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [4:0]   rt_addr,
  // subsystem status inputs
  input  logic         srv_req_in,
  input  logic         busy_in,
  input  logic         subsys_flag_in,
  input  logic         term_flag_in,
  // subsystem buffers
  input  logic         txbuf_wr_en,
  input  logic [4:0]   txbuf_wr_addr,
  input  word_t        txbuf_wr_data,
  input  logic [4:0]   rxbuf_rd_addr,
  output word_t        rxbuf_rd_data,
  // message events
  output logic         rx_msg_done,
  output logic         tx_msg_done,
  output cmd_word_t    last_cmd,
  output status_word_t status_word,
  // bus
  input  bus_t         bus_in,
  output bus_t         bus_out
);

  localparam int unsigned US_CLKS    = 2 * HALF_BIT_CLKS;
  localparam int unsigned GAP_CLKS   = RESP_GAP_US * US_CLKS;
  localparam int unsigned WTO_CLKS   = WORD_TIMEOUT_US * US_CLKS;
  localparam int unsigned TW = $clog2(((GAP_CLKS > WTO_CLKS) ? GAP_CLKS : WTO_CLKS) + 1);

  typedef enum logic [2:0] {S_LISTEN, S_RX_DATA, S_GAP, S_TX_STATUS, S_TX_DATA} state_e;

  state_e        state;
  cmd_word_t     cmd;
  logic [5:0]    n_words;
  logic [5:0]    idx;
  logic [TW-1:0] timer;
  logic          msg_err;

  logic     tx_valid, tx_ready, tx_busy, rx_valid, rx_active;
  tx_word_t tx_word;
  rx_word_t rx_word;
  logic     word_clean;
  cmd_word_t rx_cmd;

  word_t txbuf [MAX_WORDS];
  word_t rxbuf [MAX_WORDS];

  mil1553_codec #(.HALF_BIT_CLKS(HALF_BIT_CLKS)) u_codec (
    .clk       (clk),
    .rst_n     (rst_n),
    .tx_valid  (tx_valid),
    .tx_ready  (tx_ready),
    .tx_word   (tx_word),
    .tx_busy   (tx_busy),
    .rx_valid  (rx_valid),
    .rx_word   (rx_word),
    .rx_active (rx_active),
    .bus_in    (bus_in),
    .bus_out   (bus_out)
  );

  assign word_clean = rx_valid && !rx_word.perr && !rx_word.merr;
  assign rx_cmd     = cmd_word_t'(rx_word.data);

  always_comb begin
    status_word = '0;
    status_word.rt_addr     = rt_addr;
    status_word.msg_err     = msg_err;
    status_word.srv_req     = srv_req_in;
    status_word.busy        = busy_in;
    status_word.subsys_flag = subsys_flag_in;
    status_word.term_flag   = term_flag_in;
  end

  always_comb begin
    tx_valid = 1'b0;
    tx_word  = '0;
    if (state == S_TX_STATUS) begin
      tx_valid = 1'b1;
      tx_word  = '{cs_sync: 1'b1, data: word_t'(status_word)};
    end else if (state == S_TX_DATA) begin
      tx_valid = 1'b1;
      tx_word  = '{cs_sync: 1'b0, data: txbuf[idx[4:0]]};
    end
  end

  assign last_cmd      = cmd;
  assign rxbuf_rd_data = rxbuf[rxbuf_rd_addr];

  always_ff @(posedge clk) begin
    if (txbuf_wr_en) txbuf[txbuf_wr_addr] <= txbuf_wr_data;
    if (state == S_RX_DATA && word_clean && !rx_word.cs_sync)
      rxbuf[idx[4:0]] <= rx_word.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LISTEN;
      cmd         <= '0;
      n_words     <= '0;
      idx         <= '0;
      timer       <= '0;
      msg_err     <= 1'b0;
      rx_msg_done <= 1'b0;
      tx_msg_done <= 1'b0;
    end else begin
      rx_msg_done <= 1'b0;
      tx_msg_done <= 1'b0;

      // silence timer for the response gap and for pauses inside received data
      if (tx_busy || rx_active || rx_valid) timer <= '0;
      else if (timer != '1)                 timer <= timer + TW'(1);

      unique case (state)
        S_LISTEN: begin
          if (word_clean && rx_word.cs_sync && rx_cmd.rt_addr == rt_addr) begin
            cmd     <= rx_cmd;
            n_words <= word_count(rx_cmd.wc);
            idx     <= '0;
            msg_err <= 1'b0;
            state   <= rx_cmd.tr ? S_GAP : S_RX_DATA;
          end
        end
        S_RX_DATA: begin
          if (rx_valid) begin
            if (!word_clean || rx_word.cs_sync) begin
              msg_err <= 1'b1;
              state   <= S_LISTEN;
            end else if (idx == n_words - 6'd1) begin
              rx_msg_done <= 1'b1;
              state       <= S_GAP;
            end else begin
              idx <= idx + 6'd1;
            end
          end else if (timer >= TW'(WTO_CLKS)) begin
            msg_err <= 1'b1;
            state   <= S_LISTEN;
          end
        end
        S_GAP: begin
          if (timer >= TW'(GAP_CLKS)) state <= S_TX_STATUS;
        end
        S_TX_STATUS: begin
          if (tx_ready) begin
            idx <= '0;
            if (cmd.tr && !busy_in) begin
              state <= S_TX_DATA;
            end else begin
              state <= S_LISTEN;
            end
          end
        end
        S_TX_DATA: begin
          if (tx_ready) begin
            if (idx == n_words - 6'd1) begin
              tx_msg_done <= 1'b1;
              state       <= S_LISTEN;
            end else begin
              idx <= idx + 6'd1;
            end
          end
        end
        default: state <= S_LISTEN;
      endcase
    end
  end

endmodule
