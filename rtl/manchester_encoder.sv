// manchester_encoder: turns 16-bit words into MIL-STD-1553B Manchester bi-phase bus levels.
//
// A word is accepted with a valid/ready handshake together with the kind of sync it needs.
// The encoder builds the 40 half-bit level sequence (3 bit-time sync, 16 data bits, odd parity;
// see mil1553_pkg::word_pattern) and shifts it onto the bus, one half bit every
// HALF_BIT_CLKS clocks. Data 1 goes out as high-then-low and data 0 as low-then-high; the
// command/status sync is 1.5 bit times high then 1.5 low, the data sync the reverse. That
// coding and the word layout follow the paper; the handshake is this design's own.
//
// Timing: the first half bit appears on the cycle after the handshake and a word lasts
// 40*HALF_BIT_CLKS cycles. `tx_ready` is also high on the last cycle of a word, so a word
// offered then follows the previous one with no gap, as a message needs. `busy` is high
// while the bus is driven. With HALF_BIT_CLKS = 8 the clock is 16 MHz for the 1 Mbit/s bus.
module manchester_encoder
  import mil1553_pkg::*;
#(
  parameter int unsigned HALF_BIT_CLKS = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tx_valid,
  output logic     tx_ready,
  input  tx_word_t tx_word,
  output bus_t     bus_out,
  output logic     busy
);

  localparam int unsigned CW = (HALF_BIT_CLKS > 1) ? $clog2(HALF_BIT_CLKS) : 1;

  logic [39:0]   pattern;
  logic [5:0]    half_idx;   // half bits sent of the current word
  logic [CW-1:0] clk_cnt;
  logic          active;
  logic          last_clk;

  assign last_clk = active && (half_idx == 6'd39) && (clk_cnt == CW'(HALF_BIT_CLKS - 1));
  assign tx_ready = !active || last_clk;
  assign busy     = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pattern  <= '0;
      half_idx <= '0;
      clk_cnt  <= '0;
      active   <= 1'b0;
    end else if (tx_valid && tx_ready) begin
      pattern  <= word_pattern(tx_word);
      half_idx <= '0;
      clk_cnt  <= '0;
      active   <= 1'b1;
    end else if (active) begin
      if (clk_cnt == CW'(HALF_BIT_CLKS - 1)) begin
        clk_cnt <= '0;
        if (half_idx == 6'd39) begin
          active <= 1'b0;
        end else begin
          half_idx <= half_idx + 6'd1;
          pattern  <= {pattern[38:0], 1'b0};
        end
      end else begin
        clk_cnt <= clk_cnt + CW'(1);
      end
    end
  end

  assign bus_out.pos = active && pattern[39];
  assign bus_out.neg = active && !pattern[39];

  initial begin
    assert (HALF_BIT_CLKS >= 2) else $error("HALF_BIT_CLKS must be at least 2");
  end

endmodule
