// mil1553_codec: the common encoder/decoder block of a 1553B terminal.
//
// The paper builds one shared encoder/decoder block into the bus controller instead of
// separate units; the same block serves the remote terminals here. It holds one
// manchester_encoder and one manchester_decoder on the terminal's bus connection. While the
// terminal's own encoder drives the bus, the decoder sees an idle bus, so a terminal never
// decodes its own transmission (this receive inhibit is this design's choice; the paper
// does not say how a terminal treats its own echo).
//
// Interface: words to send with a valid/ready handshake (`tx_*`), decoded words as a
// one-cycle `rx_valid` pulse with `rx_word`. `tx_busy` is high while the terminal drives the
// bus and `rx_active` while a word is being decoded. Timing is that of the two sub-blocks.
module mil1553_codec
  import mil1553_pkg::*;
#(
  parameter int unsigned HALF_BIT_CLKS = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  // transmit side
  input  logic     tx_valid,
  output logic     tx_ready,
  input  tx_word_t tx_word,
  output logic     tx_busy,
  // receive side
  output logic     rx_valid,
  output rx_word_t rx_word,
  output logic     rx_active,
  // bus connection
  input  bus_t     bus_in,
  output bus_t     bus_out
);

  bus_t rx_bus;

  manchester_encoder #(.HALF_BIT_CLKS(HALF_BIT_CLKS)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .tx_valid (tx_valid),
    .tx_ready (tx_ready),
    .tx_word  (tx_word),
    .bus_out  (bus_out),
    .busy     (tx_busy)
  );

  assign rx_bus = tx_busy ? BUS_IDLE : bus_in;

  manchester_decoder #(.HALF_BIT_CLKS(HALF_BIT_CLKS)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_in    (rx_bus),
    .rx_valid  (rx_valid),
    .rx_word   (rx_word),
    .rx_active (rx_active)
  );

endmodule
