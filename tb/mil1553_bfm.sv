// mil1553_bfm: testbench bus-functional model of a 1553B terminal's line interface.
//
// Drive side: send_words() puts a list of words on `drv` back to back, each as a 3 bit-time
// sync, 16 Manchester bits and odd parity, written out half bit by half bit from the
// standard's rules (independently of the RTL encoder). Levels change on the falling clock
// edge. Per word a fault can be requested: FLT_PARITY sends the wrong parity, FLT_MANCH
// sends one data bit with both halves equal.
//
// Monitor side: a behavioural decoder watches `mon` and pushes every word it finds into
// `rx_q` with the cycle at which its last half bit ended. It measures level runs to find the
// sync and samples in the middle of each half bit.
module mil1553_bfm
  import mil1553_pkg::*;
  import mil1553_tb_pkg::*;
#(
  parameter int unsigned N = 8          // clocks per half bit
) (
  input  logic clk,
  output bus_t drv,
  input  bus_t mon
);

  localparam int FLT_NONE   = 0;
  localparam int FLT_PARITY = 1;
  localparam int FLT_MANCH  = 2;

  mon_word_t rx_q[$];
  longint    cycle = 0;

  initial drv = '0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic put_half(input bit lvl);
    drv.pos = lvl;
    drv.neg = !lvl;
    repeat (N) @(negedge clk);
  endtask

  // words[i][16] selects the command/status sync, words[i][15:0] is the data
  task automatic send_words(input logic [16:0] words[$], input int fault_word = -1,
                            input int fault = 0);
    @(negedge clk);
    foreach (words[w]) begin
      bit          cs;
      logic [15:0] d;
      int          ones;
      bit          par;
      cs   = words[w][16];
      d    = words[w][15:0];
      ones = 0;
      for (int i = 0; i < 16; i++) ones += d[i];
      par = (ones % 2 == 0);
      if (w == fault_word && fault == FLT_PARITY) par = !par;
      repeat (3) put_half(cs);
      repeat (3) put_half(!cs);
      for (int i = 15; i >= 0; i--) begin
        if (w == fault_word && fault == FLT_MANCH && i == 7) begin
          put_half(d[i]);
          put_half(d[i]);
        end else begin
          put_half(d[i]);
          put_half(!d[i]);
        end
      end
      put_half(par);
      put_half(!par);
    end
    drv = '0;
  endtask

  // level: 1 = positive, -1 = negative, 0 = idle or both
  function automatic int lvl_of(bus_t b);
    if (b.pos && !b.neg) return 1;
    if (b.neg && !b.pos) return -1;
    return 0;
  endfunction

  initial begin : monitor
    int prev, cur, run;
    prev = 0;
    run  = 0;
    forever begin
      @(posedge clk);
      cur = lvl_of(mon);
      if (cur != prev && cur != 0 && prev == -cur && run * 2 >= 5 * N && run * 2 <= 9 * N) begin
        // middle of a sync: cur is the second sync level
        mon_word_t mw;
        int        s[40];
        int        ones;
        mw.cs   = (prev == 1);
        mw.merr = 0;
        // sample the remaining 34 half bits of the word plus the second sync part
        for (int h = 0; h < 37; h++) begin
          repeat (N / 2) @(posedge clk);
          s[h] = lvl_of(mon);
          repeat (N - N / 2) @(posedge clk);
        end
        for (int h = 0; h < 3; h++) if (s[h] != -prev) mw.merr = 1;
        ones = 0;
        for (int b = 0; b < 17; b++) begin
          int a, c;
          a = s[3 + 2 * b];
          c = s[4 + 2 * b];
          if (a == 0 || c == 0 || a == c) mw.merr = 1;
          if (b < 16) mw.data[15 - b] = (a == 1);
          if (a == 1) ones++;
        end
        mw.perr      = (ones % 2 == 0);
        mw.end_cycle = cycle;
        rx_q.push_back(mw);
        prev = lvl_of(mon);
        run  = 1;
      end else begin
        if (cur == prev) run++;
        else run = 1;
        prev = cur;
      end
    end
  end

endmodule
