// serial_port: one asynchronous serial port of the gateway.
//
// Built, as the design describes, from a control module (port_ctrl), a
// receiver module (uart_rx), a transfer module (uart_tx) and the port's data
// I/O buffer, here split into a receive buffer (serial to Ethernet) and a
// transmit buffer (Ethernet to serial), both io_buffer FIFOs of BUF_DEPTH
// bytes. The receive side exposes the head of the receive buffer, its fill
// level and block_ready to the frame packer; the transmit side accepts
// bytes and send commands from the frame unpacker. Configuration goes
// through the control module's register bus. Line format is 8 data bits,
// no parity, one stop bit, at the rate set in the baud rate register.
module serial_port #(
  parameter int unsigned DIV_W      = 16,
  parameter int unsigned BAUD_DIV   = 1000,
  parameter int unsigned BLOCK_SIZE = 10,
  parameter int unsigned BUF_DEPTH  = 64,
  parameter int unsigned LEN_W      = 9,
  parameter int unsigned AW         = $clog2(BUF_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rxd,
  output logic             txd,
  // register bus
  input  logic             cfg_we,
  input  logic [2:0]       cfg_addr,
  input  logic [15:0]      cfg_wdata,
  output logic [15:0]      cfg_rdata,
  // receive buffer towards the packer
  input  logic             rx_pop,
  output logic [7:0]       rx_dout,
  output logic [AW:0]      rx_count,
  output logic             block_ready,
  input  logic             block_clr,
  // transmit buffer from the unpacker
  input  logic             tx_push,
  input  logic [7:0]       tx_din,
  output logic             tx_full,
  input  logic             send_cmd,
  input  logic [LEN_W-1:0] send_len,
  // status
  output logic             send_done,
  output logic             rx_overflow,
  output logic             rx_err
);
  logic [DIV_W-1:0] div;
  logic [7:0]       rx_data, rx_push_data, tx_dout, hold_data;
  logic             rx_valid, rx_push, rx_full, rx_empty;
  logic             err_start, err_stop;
  logic             tx_empty, tx_pop, hold_full, hold_ack, tx_busy;
  logic [AW:0]      tx_count;

  assign rx_err = err_start | err_stop;

  uart_rx #(.DIV_W(DIV_W)) u_rx (
    .clk, .rst_n, .div, .rxd, .data(rx_data), .valid(rx_valid),
    .err_start, .err_stop
  );

  port_ctrl #(.DIV_W(DIV_W), .BAUD_DIV(BAUD_DIV), .BLOCK_SIZE(BLOCK_SIZE),
              .LEN_W(LEN_W)) u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .div,
    .rx_valid, .rx_data, .rx_push, .rx_push_data, .rx_full,
    .block_ready, .block_clr, .rx_overflow,
    .send_cmd, .send_len, .tx_empty, .tx_dout, .tx_pop,
    .hold_data, .hold_full, .hold_ack, .tx_busy, .send_done
  );

  io_buffer #(.DEPTH(BUF_DEPTH)) u_rxbuf (
    .clk, .rst_n, .push(rx_push), .din(rx_push_data), .pop(rx_pop),
    .dout(rx_dout), .empty(rx_empty), .full(rx_full), .count(rx_count)
  );

  io_buffer #(.DEPTH(BUF_DEPTH)) u_txbuf (
    .clk, .rst_n, .push(tx_push), .din(tx_din), .pop(tx_pop),
    .dout(tx_dout), .empty(tx_empty), .full(tx_full), .count(tx_count)
  );

  uart_tx #(.DIV_W(DIV_W)) u_tx (
    .clk, .rst_n, .div, .hold_data, .hold_full, .hold_ack, .txd, .busy(tx_busy)
  );
endmodule
