// manchester_decoder: recovers MIL-STD-1553B words from the Manchester bi-phase bus levels.
//
// The two bus lines are first passed through a two-flop synchroniser and read as one of three
// levels (positive, negative, idle). A run-length counter measures how long the bus has held
// its level. While hunting, a change to the opposite level after a run of 2.5 to 4.5 half bits
// can only be the middle of a sync, since Manchester data never holds a level longer than two
// half bits (4 half bits happen when the previous word's parity half matches the sync). The
// level before the change gives the sync type: positive first is a command/status sync,
// negative first a data sync.
//
// From the sync middle the decoder samples the bus in the middle of every half bit: the three
// halves of the second sync part must hold the opposite level, and each of the 17 following
// bits (16 data, 1 parity) must have two different non-idle halves; the first half gives the
// bit (high first = 1). A failure of either sets `merr`, an even count of ones over data and
// parity sets `perr`. The word, its sync type and both flags are presented with a one-cycle
// `rx_valid` pulse; the flag names follow the receive signals the paper shows
// (word valid, parity error, command or data sync). The sampling scheme is this design's own:
// the paper only says decoding reverses the encoding.
//
// Timing: `rx_valid` is high HALF_BIT_CLKS/2 + 3 cycles after the word's last half bit begins
// on the bus (two synchroniser cycles, half a half bit to its middle, one output register).
// `rx_active` is high from the sync middle until the word is delivered, so a user can time
// bus silence with it.
module manchester_decoder
  import mil1553_pkg::*;
#(
  parameter int unsigned HALF_BIT_CLKS = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_t     bus_in,
  output logic     rx_valid,
  output rx_word_t rx_word,
  output logic     rx_active
);

  typedef enum logic [1:0] {LVL_IDLE = 2'd0, LVL_HI = 2'd1, LVL_LO = 2'd2} level_e;
  typedef enum logic {S_HUNT, S_DECODE} state_e;

  localparam int unsigned N      = HALF_BIT_CLKS;
  localparam int unsigned RUN_MAX = 5 * N;
  localparam int unsigned RW     = $clog2(RUN_MAX + 1);
  localparam int unsigned CW     = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned RUN_LO = 3 * N - N / 2;
  localparam int unsigned RUN_HI = 4 * N + N / 2;

  bus_t        sync1, sync2;
  level_e      level, prev_level;
  logic [RW-1:0] run_len;
  state_e      state;
  logic [CW-1:0] pc;          // clock within the current half bit
  logic [5:0]  hidx;          // half bit since the sync middle
  level_e      first_half;
  logic        sync_cs;
  logic [16:0] bits;          // 16 data bits then parity
  logic        merr;
  logic        sample;
  logic        sync_seen;

  always_comb begin
    unique case ({sync2.pos, sync2.neg})
      2'b10:   level = LVL_HI;
      2'b01:   level = LVL_LO;
      default: level = LVL_IDLE;
    endcase
  end

  assign sync_seen = (state == S_HUNT) && (prev_level != LVL_IDLE) && (level != LVL_IDLE) &&
                     (level != prev_level) && (run_len >= RW'(RUN_LO)) &&
                     (run_len <= RW'(RUN_HI));
  assign sample    = (state == S_DECODE) && (pc == CW'(N / 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1      <= BUS_IDLE;
      sync2      <= BUS_IDLE;
      prev_level <= LVL_IDLE;
      run_len    <= '0;
      state      <= S_HUNT;
      pc         <= '0;
      hidx       <= '0;
      first_half <= LVL_IDLE;
      sync_cs    <= 1'b0;
      bits       <= '0;
      merr       <= 1'b0;
      rx_valid   <= 1'b0;
      rx_word    <= '0;
    end else begin
      sync1      <= bus_in;
      sync2      <= sync1;
      prev_level <= level;
      rx_valid   <= 1'b0;

      if (level != prev_level)       run_len <= RW'(1);
      else if (run_len != RW'(RUN_MAX)) run_len <= run_len + RW'(1);

      unique case (state)
        S_HUNT: begin
          if (sync_seen) begin
            state   <= S_DECODE;
            sync_cs <= (prev_level == LVL_HI);
            pc      <= CW'(1);
            hidx    <= '0;
            merr    <= 1'b0;
          end
        end
        S_DECODE: begin
          if (pc == CW'(N - 1)) begin
            pc   <= '0;
            hidx <= hidx + 6'd1;
          end else begin
            pc <= pc + CW'(1);
          end
          if (sample) begin
            if (hidx < 6'd3) begin
              // second part of the sync: opposite of the first part
              if (level != (sync_cs ? LVL_LO : LVL_HI)) merr <= 1'b1;
            end else if (hidx[0]) begin
              first_half <= level;
            end else begin
              bits <= {bits[15:0], (first_half == LVL_HI)};
              if (first_half == LVL_IDLE || level == LVL_IDLE || level == first_half)
                merr <= 1'b1;
              if (hidx == 6'd36) begin
                state <= S_HUNT;
              end
            end
          end
        end
        default: state <= S_HUNT;
      endcase

      // deliver the word one cycle after its parity bit was sampled
      if (state == S_HUNT && hidx == 6'd36) begin
        rx_valid      <= 1'b1;
        rx_word.cs_sync <= sync_cs;
        rx_word.data  <= bits[16:1];
        rx_word.perr  <= (^bits) == 1'b0;
        rx_word.merr  <= merr;
        hidx          <= '0;
      end
    end
  end

  assign rx_active = (state == S_DECODE) || (hidx == 6'd36);

  initial begin
    assert (HALF_BIT_CLKS >= 2) else $error("HALF_BIT_CLKS must be at least 2");
  end

endmodule
