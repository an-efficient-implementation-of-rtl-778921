// mil1553_system: a MIL-STD-1553B bus with one bus controller and three remote terminals.
//
// This is the arrangement the paper builds to show its bus controller at work: the BC
// (protocol controller plus common encoder/decoder) and three RTs, RT1 to RT3, on one shared
// serial bus. RT number i answers to address i (1, 2, 3). The host drives the BC's message
// requests; each RT's subsystem side (buffers, status bits, message events) is brought out as
// arrays indexed 0..NUM_RT-1 for RT1..RT3. A further input, `ext_bus`, lets one more device on
// the bus (another terminal, a monitor, a source of noise) drive it; tie it to zero when
// unused. The combined bus and a collision flag are outputs.
//
// One clock of 2*HALF_BIT_CLKS cycles per 1 us bit time (16 MHz by default), active-low
// asynchronous reset.
module mil1553_system
  import mil1553_pkg::*;
#(
  parameter int unsigned HALF_BIT_CLKS = 8,
  parameter int unsigned NUM_RT        = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  // bus controller host side
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
  input  logic         bc_txbuf_wr_en,
  input  logic [4:0]   bc_txbuf_wr_addr,
  input  word_t        bc_txbuf_wr_data,
  input  logic [4:0]   bc_rxbuf_rd_addr,
  output word_t        bc_rxbuf_rd_data,
  // remote terminal subsystem sides
  input  logic         rt_srv_req     [NUM_RT],
  input  logic         rt_busy        [NUM_RT],
  input  logic         rt_subsys_flag [NUM_RT],
  input  logic         rt_term_flag   [NUM_RT],
  input  logic         rt_txbuf_wr_en   [NUM_RT],
  input  logic [4:0]   rt_txbuf_wr_addr [NUM_RT],
  input  word_t        rt_txbuf_wr_data [NUM_RT],
  input  logic [4:0]   rt_rxbuf_rd_addr [NUM_RT],
  output word_t        rt_rxbuf_rd_data [NUM_RT],
  output logic         rt_rx_msg_done [NUM_RT],
  output logic         rt_tx_msg_done [NUM_RT],
  output cmd_word_t    rt_last_cmd    [NUM_RT],
  output status_word_t rt_status_word [NUM_RT],
  // the bus
  input  bus_t         ext_bus,
  output bus_t         bus,
  output logic         collision
);

  bus_t drv [NUM_RT + 2];

  bus_controller #(.HALF_BIT_CLKS(HALF_BIT_CLKS)) u_bc (
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
    .txbuf_wr_en   (bc_txbuf_wr_en),
    .txbuf_wr_addr (bc_txbuf_wr_addr),
    .txbuf_wr_data (bc_txbuf_wr_data),
    .rxbuf_rd_addr (bc_rxbuf_rd_addr),
    .rxbuf_rd_data (bc_rxbuf_rd_data),
    .bus_in        (bus),
    .bus_out       (drv[0])
  );

  for (genvar i = 0; i < NUM_RT; i++) begin : g_rt
    remote_terminal #(.HALF_BIT_CLKS(HALF_BIT_CLKS)) u_rt (
      .clk            (clk),
      .rst_n          (rst_n),
      .rt_addr        (5'(i + 1)),
      .srv_req_in     (rt_srv_req[i]),
      .busy_in        (rt_busy[i]),
      .subsys_flag_in (rt_subsys_flag[i]),
      .term_flag_in   (rt_term_flag[i]),
      .txbuf_wr_en    (rt_txbuf_wr_en[i]),
      .txbuf_wr_addr  (rt_txbuf_wr_addr[i]),
      .txbuf_wr_data  (rt_txbuf_wr_data[i]),
      .rxbuf_rd_addr  (rt_rxbuf_rd_addr[i]),
      .rxbuf_rd_data  (rt_rxbuf_rd_data[i]),
      .rx_msg_done    (rt_rx_msg_done[i]),
      .tx_msg_done    (rt_tx_msg_done[i]),
      .last_cmd       (rt_last_cmd[i]),
      .status_word    (rt_status_word[i]),
      .bus_in         (bus),
      .bus_out        (drv[i + 1])
    );
  end

  assign drv[NUM_RT + 1] = ext_bus;

  mil1553_bus #(.NUM_DRIVERS(NUM_RT + 2)) u_bus (
    .drv       (drv),
    .bus       (bus),
    .collision (collision)
  );

endmodule
