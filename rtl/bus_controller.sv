// bus_controller: the MIL-STD-1553B bus controller (BC), the sole initiator of bus traffic.
//
// As in the paper's block diagram it is a protocol controller joined to one common
// encoder/decoder block, which connects to the bus. The host asks for a message (T/R, RT
// address, subaddress, word count); the BC frames and sends the command word, sends the data
// words of a BC-to-RT message, checks the RT's response and repeats an unanswered or invalid
// message up to three more times. See bc_protocol_controller for the message sequencing and
// mil1553_codec for the line coding.
//
// Interface: host request/result ports and buffer ports as in bc_protocol_controller; the bus
// as two lines (bus_t) in each direction, to be combined with the other terminals' outputs.
// One clock, 2*HALF_BIT_CLKS cycles per 1 us bit time.
module bus_controller
  import mil1553_pkg::*;
#(
  parameter int unsigned HALF_BIT_CLKS   = 8,
  parameter int unsigned MAX_RETRIES     = 3,
  parameter int unsigned RESP_TIMEOUT_US = 14,
  parameter int unsigned GAP_US          = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         msg_start,
  output logic         msg_ready,
  input  logic         msg_tr,
  input  logic [4:0]   msg_rt_addr,
  input  logic [4:0]   msg_subaddr,
  input  logic [4:0]   msg_wc,
  output logic         msg_done,
  output logic         msg_ok,
  output logic [2:0]   msg_attempts,
  output status_word_t msg_status,
  output word_t        cmd_word,
  input  logic         txbuf_wr_en,
  input  logic [4:0]   txbuf_wr_addr,
  input  word_t        txbuf_wr_data,
  input  logic [4:0]   rxbuf_rd_addr,
  output word_t        rxbuf_rd_data,
  input  bus_t         bus_in,
  output bus_t         bus_out
);

  logic     tx_valid, tx_ready, tx_busy, rx_valid, rx_active;
  tx_word_t tx_word;
  rx_word_t rx_word;

  bc_protocol_controller #(
    .HALF_BIT_CLKS   (HALF_BIT_CLKS),
    .MAX_RETRIES     (MAX_RETRIES),
    .RESP_TIMEOUT_US (RESP_TIMEOUT_US),
    .GAP_US          (GAP_US)
  ) u_pc (
    .clk           (clk),
    .rst_n         (rst_n),
    .msg_start     (msg_start),
    .msg_ready     (msg_ready),
    .msg_tr        (msg_tr),
    .msg_rt_addr   (msg_rt_addr),
    .msg_subaddr   (msg_subaddr),
    .msg_wc        (msg_wc),
    .msg_done      (msg_done),
    .msg_ok        (msg_ok),
    .msg_attempts  (msg_attempts),
    .msg_status    (msg_status),
    .cmd_word      (cmd_word),
    .txbuf_wr_en   (txbuf_wr_en),
    .txbuf_wr_addr (txbuf_wr_addr),
    .txbuf_wr_data (txbuf_wr_data),
    .rxbuf_rd_addr (rxbuf_rd_addr),
    .rxbuf_rd_data (rxbuf_rd_data),
    .tx_valid      (tx_valid),
    .tx_ready      (tx_ready),
    .tx_word       (tx_word),
    .tx_busy       (tx_busy),
    .rx_valid      (rx_valid),
    .rx_word       (rx_word),
    .rx_active     (rx_active)
  );

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

endmodule
