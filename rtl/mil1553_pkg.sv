// mil1553_pkg: word formats, bus signalling types and helper functions shared by the
// MIL-STD-1553B bus controller, remote terminal and Manchester encoder/decoder.
//
// Word layout (bit times 4..19 of a 20-bit-time word, sent MSB first):
//   command word : RT address[4:0] | T/R | subaddress/mode[4:0] | word count/mode code[4:0]
//   status word  : RT address[4:0] | message error | instrumentation | service request |
//                  reserved[2:0] | broadcast cmd received | busy | subsystem flag |
//                  dynamic bus control acceptance | terminal flag
//   data word    : 16 data bits
// Every word is preceded by a 3-bit-time sync (command/status: high then low, data: low then
// high) and followed by an odd parity bit. These field positions are those of the standard.
//
// The bus itself is differential and three-level (positive, negative, idle). It is modelled
// here as two digital lines, as a transceiver's logic side presents it: `pos` high means the
// positive level, `neg` high the negative level, both low an idle bus.
package mil1553_pkg;

  localparam int unsigned MAX_WORDS = 32;   // data words per message

  typedef logic [15:0] word_t;

  // Two-line view of the bus (see header).
  typedef struct packed {
    logic pos;
    logic neg;
  } bus_t;

  localparam bus_t BUS_IDLE = '{pos: 1'b0, neg: 1'b0};

  typedef struct packed {
    logic [4:0] rt_addr;
    logic       tr;          // 0 = RT receives, 1 = RT transmits
    logic [4:0] subaddr;
    logic [4:0] wc;          // data word count, 0 means 32
  } cmd_word_t;

  typedef struct packed {
    logic [4:0] rt_addr;
    logic       msg_err;
    logic       instr;
    logic       srv_req;
    logic [2:0] reserved;
    logic       bcast_rx;
    logic       busy;
    logic       subsys_flag;
    logic       dyn_bus_ctrl;
    logic       term_flag;
  } status_word_t;

  // A word handed to the encoder: its 16 bits and which sync goes in front of it.
  typedef struct packed {
    logic  cs_sync;          // 1 = command/status sync, 0 = data sync
    word_t data;
  } tx_word_t;

  // A word recovered by the decoder.
  typedef struct packed {
    logic  cs_sync;          // 1 = command/status sync seen, 0 = data sync
    word_t data;
    logic  perr;             // odd parity violated
    logic  merr;             // a bit without its mid-bit transition, or a bad sync
  } rx_word_t;

  // Odd parity: the parity bit makes the number of ones in data+parity odd.
  function automatic logic odd_parity(input word_t d);
    return ~(^d);
  endfunction

  // Number of data words named by a word count field (0 stands for 32).
  function automatic logic [5:0] word_count(input logic [4:0] wc);
    return (wc == 5'd0) ? 6'd32 : {1'b0, wc};
  endfunction

  // Level sequence of one word, one entry per half bit, first half bit in bit 39.
  // 1 = positive level, 0 = negative level. Data 1 is sent high-then-low, 0 low-then-high.
  function automatic logic [39:0] word_pattern(input tx_word_t w);
    logic [39:0] p;
    logic        par;
    par = odd_parity(w.data);
    p[39:34] = w.cs_sync ? 6'b111000 : 6'b000111;
    for (int i = 0; i < 16; i++) begin
      p[33 - 2*i]     = w.data[15 - i];
      p[33 - 2*i - 1] = ~w.data[15 - i];
    end
    p[1] = par;
    p[0] = ~par;
    return p;
  endfunction

endpackage
