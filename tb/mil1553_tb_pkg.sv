// mil1553_tb_pkg: types shared by the testbenches' bus-functional model and its users.
package mil1553_tb_pkg;

  // A word seen by the behavioural bus monitor.
  typedef struct {
    bit          cs;          // command/status sync
    logic [15:0] data;
    bit          perr;
    bit          merr;
    longint      end_cycle;   // clock count when its last half bit ended
  } mon_word_t;

endpackage
