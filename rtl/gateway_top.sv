// gateway_top: multi-serial to Ethernet gateway.
//
// N_PORTS (16) asynchronous serial ports share one Ethernet link through an
// RTL8019AS controller on an ISA-style bus. Serial to Ethernet: each port
// receives characters into its receive buffer; when a port has received
// BLOCK_SIZE (10) characters, or every PACK_PERIOD cycles (100 ms), the
// frame packer gathers the data of all ports into one Ethernet frame, each
// port's data behind the sync heads FF EE, its port number and its length,
// and the controller driver copies it into the controller and sends it.
// Ethernet to serial: the driver polls the controller's receive ring,
// reads each new IP frame and streams its payload to the unpacker, which
// sends every record to the port its number names, sync heads first.
// Clock: clk is the 19.2 MHz clock the FPGA's PLL makes from the 40.6 MHz
// crystal (the PLL itself is outside this RTL); rst_n is an asynchronous
// active-low reset. The serial pins are at logic level (the RS232 level
// converters are outside). The ISA bus is split into sd_o/sd_oe/sd_i for
// the bidirectional data lines. cfg_* reach the registers of port cfg_port
// (see port_ctrl). events pulses one flag per cycle for each event.
// What follows the design: the port count, clock and baud divider, the
// 10-character and 100 ms packaging rule, the sync heads, the controller
// register values and the receive and send flows. This design's own: the
// record layout inside the frame, buffer depths, MAC addresses, the I/O base
// and the bus timing.
module gateway_top
  import gateway_pkg::*;
#(
  parameter int unsigned N_PORTS     = 16,
  parameter int unsigned BAUD_DIV    = 1000,        // 19200 bit/s at 19.2 MHz
  parameter int unsigned BLOCK_SIZE  = 10,
  parameter int unsigned BUF_DEPTH   = 64,
  parameter int unsigned PACK_PERIOD = 1_920_000,   // 100 ms at 19.2 MHz
  parameter logic [15:0] IO_BASE     = 16'h0300,
  parameter logic [47:0] MAC         = 48'h0200_0000_0001,
  parameter logic [47:0] HOST_MAC    = 48'hFFFF_FFFF_FFFF,
  parameter int unsigned PW          = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // serial ports (logic level)
  input  logic [N_PORTS-1:0] rxd,
  output logic [N_PORTS-1:0] txd,
  // ISA bus to the Ethernet controller
  output logic [15:0]        sa,
  output logic [7:0]         sd_o,
  output logic               sd_oe,
  input  logic [7:0]         sd_i,
  output logic               iorb,
  output logic               iowb,
  // port register bus
  input  logic               cfg_we,
  input  logic [PW-1:0]      cfg_port,
  input  logic [2:0]         cfg_addr,
  input  logic [15:0]        cfg_wdata,
  output logic [15:0]        cfg_rdata,
  // status
  output logic               init_done,
  output logic               txd_buffer_select,
  output logic [N_PORTS-1:0] send_done,
  output logic [N_PORTS-1:0] rx_overflow,
  output logic [N_PORTS-1:0] rx_err,
  output gw_events_t         events
);
  localparam int unsigned AW    = $clog2(BUF_DEPTH);
  localparam int unsigned FB_AW = 11;
  localparam int unsigned LEN_W = 9;

  logic [N_PORTS-1:0][AW:0]  rx_count;
  logic [N_PORTS-1:0][7:0]   rx_dout;
  logic [N_PORTS-1:0][15:0]  port_rdata;
  logic [N_PORTS-1:0]        block_ready, block_clr, rx_pop;
  logic [N_PORTS-1:0]        tx_push, tx_full, send_cmd;
  logic [7:0]                tx_data;
  logic [LEN_W-1:0]          send_len;

  logic [FB_AW-1:0]          fb_raddr, frame_len;
  logic [7:0]                fb_rdata;
  logic                      frame_valid, frame_done;
  logic                      pl_start, pl_valid, pl_ready;
  logic [7:0]                pl_data;

  assign cfg_rdata = port_rdata[cfg_port];

  for (genvar i = 0; i < N_PORTS; i++) begin : g_port
    serial_port #(.BAUD_DIV(BAUD_DIV), .BLOCK_SIZE(BLOCK_SIZE),
                  .BUF_DEPTH(BUF_DEPTH), .LEN_W(LEN_W)) u_port (
      .clk, .rst_n, .rxd(rxd[i]), .txd(txd[i]),
      .cfg_we(cfg_we && cfg_port == PW'(i)), .cfg_addr, .cfg_wdata,
      .cfg_rdata(port_rdata[i]),
      .rx_pop(rx_pop[i]), .rx_dout(rx_dout[i]), .rx_count(rx_count[i]),
      .block_ready(block_ready[i]), .block_clr(block_clr[i]),
      .tx_push(tx_push[i]), .tx_din(tx_data), .tx_full(tx_full[i]),
      .send_cmd(send_cmd[i]), .send_len,
      .send_done(send_done[i]), .rx_overflow(rx_overflow[i]), .rx_err(rx_err[i])
    );
  end

  frame_packer #(.N_PORTS(N_PORTS), .AW(AW), .FB_AW(FB_AW),
                 .PACK_PERIOD(PACK_PERIOD), .DST_MAC(HOST_MAC), .SRC_MAC(MAC)) u_pack (
    .clk, .rst_n, .rx_count, .rx_dout, .block_ready, .rx_pop, .block_clr,
    .fb_raddr, .fb_rdata, .frame_valid, .frame_len, .frame_done,
    .pack_block(events.pack_block), .pack_timer(events.pack_timer)
  );

  nic_driver #(.MAC(MAC), .FB_AW(FB_AW), .IO_BASE(IO_BASE)) u_nic (
    .clk, .rst_n, .frame_valid, .frame_len, .fb_raddr, .fb_rdata, .frame_done,
    .pl_start, .pl_valid, .pl_data, .pl_ready,
    .sa, .sd_o, .sd_oe, .sd_i, .iorb, .iowb,
    .init_done, .tx_ok(events.tx_ok), .tx_retry(events.tx_retry),
    .tx_fail(events.tx_fail), .rx_frame(events.rx_frame),
    .rx_error(events.rx_error), .rx_other(events.rx_other), .txd_buffer_select
  );

  frame_unpacker #(.N_PORTS(N_PORTS), .LEN_W(LEN_W)) u_unpack (
    .clk, .rst_n, .start(pl_start), .in_valid(pl_valid), .in_data(pl_data),
    .in_ready(pl_ready), .tx_full, .tx_push, .tx_data, .send_cmd, .send_len,
    .rec_done(events.rec_done), .bad_port(events.bad_port)
  );
endmodule
