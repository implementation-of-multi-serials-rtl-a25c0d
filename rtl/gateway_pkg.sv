// gateway_pkg: constants and types shared by the serial-to-Ethernet gateway.
//
// Holds the sync head bytes that frame every serial record, the RTL8019AS
// register map and command-register layout, and the register values the
// controller is initialised with. The command-register bit layout (PS1 PS0
// RD2 RD1 RD0 TXP STA STP) and the initialisation values (0x21, PSTART 0x4c,
// PSTOP 0x80, BNRY 0x4c, TPSR 0x45, RCR 0xcc, TCR 0xe0, DCR 0xc8, IMR 0x00,
// CURR 0x4d, 0x22) follow the design description. The remaining register
// offsets are those of the NE2000-compatible register set of the chip; the
// record layout (sync heads, port number, length) and the second transmit
// page are this design's own choices.
package gateway_pkg;

  // Sync heads placed in front of every serial record, both directions.
  localparam logic [7:0] SYNC_HEAD0 = 8'hFF;
  localparam logic [7:0] SYNC_HEAD1 = 8'hEE;

  // Command register (offset 0x00, every page).
  typedef struct packed {
    logic [1:0] ps;   // page select PS1:PS0
    logic [2:0] rd;   // remote DMA command RD2..RD0
    logic       txp;  // transmit packet
    logic       sta;  // start
    logic       stp;  // stop
  } cr_t;

  // Register offsets from the I/O base.
  localparam logic [4:0] REG_CR    = 5'h00;
  localparam logic [4:0] REG_PSTART= 5'h01;  // page 0 write
  localparam logic [4:0] REG_PSTOP = 5'h02;  // page 0 write
  localparam logic [4:0] REG_BNRY  = 5'h03;  // page 0
  localparam logic [4:0] REG_TPSR  = 5'h04;  // page 0 write
  localparam logic [4:0] REG_TSR   = 5'h04;  // page 0 read
  localparam logic [4:0] REG_TBCR0 = 5'h05;
  localparam logic [4:0] REG_TBCR1 = 5'h06;
  localparam logic [4:0] REG_CURR  = 5'h07;  // page 1
  localparam logic [4:0] REG_RSAR0 = 5'h08;
  localparam logic [4:0] REG_RSAR1 = 5'h09;
  localparam logic [4:0] REG_RBCR0 = 5'h0a;
  localparam logic [4:0] REG_RBCR1 = 5'h0b;
  localparam logic [4:0] REG_RCR   = 5'h0c;
  localparam logic [4:0] REG_TCR   = 5'h0d;
  localparam logic [4:0] REG_DCR   = 5'h0e;
  localparam logic [4:0] REG_IMR   = 5'h0f;
  localparam logic [4:0] REG_PAR0  = 5'h01;  // page 1, station address bytes 0..5
  localparam logic [4:0] REG_DATA  = 5'h10;  // remote DMA data port

  // Command register values.
  localparam logic [7:0] CR_INIT_STOP = 8'h21;  // page 0, stop
  localparam logic [7:0] CR_P1_STOP   = 8'h61;  // page 1, stop
  localparam logic [7:0] CR_START     = 8'h22;  // page 0, start, no DMA
  localparam logic [7:0] CR_P1_START  = 8'h62;  // page 1, start
  localparam logic [7:0] CR_RD_READ   = 8'h0a;  // page 0, remote read, start
  localparam logic [7:0] CR_RD_WRITE  = 8'h12;  // page 0, remote write, start
  localparam logic [7:0] CR_TRANSMIT  = 8'h26;  // page 0, transmit, start

  // Initialisation values.
  localparam logic [7:0] PSTART_PAGE = 8'h4c;
  localparam logic [7:0] PSTOP_PAGE  = 8'h80;
  localparam logic [7:0] BNRY_INIT   = 8'h4c;
  localparam logic [7:0] TPSR_INIT   = 8'h45;
  localparam logic [7:0] RCR_INIT    = 8'hcc;
  localparam logic [7:0] TCR_INIT    = 8'he0;
  localparam logic [7:0] DCR_INIT    = 8'hc8;
  localparam logic [7:0] IMR_INIT    = 8'h00;
  localparam logic [7:0] CURR_INIT   = 8'h4d;

  // Transmit buffers in the controller RAM, chosen by txd_buffer_select.
  localparam logic [7:0] TX_PAGE0 = 8'h45;
  localparam logic [7:0] TX_PAGE1 = 8'h40;

  // Status values that mean success.
  localparam logic [7:0] RSR_OK = 8'h01;
  localparam logic [7:0] TSR_OK = 8'h01;

  // Ethernet types the receive path accepts.
  localparam logic [15:0] ETH_TYPE_IP  = 16'h0800;
  localparam logic [15:0] ETH_TYPE_ARP = 16'h0806;

  localparam int unsigned ETH_HDR_BYTES = 14;
  localparam int unsigned ETH_MIN_BYTES = 60;   // without CRC
  localparam int unsigned NIC_HDR_BYTES = 4;    // RSR, next page, count low, count high
  localparam int unsigned ETH_CRC_BYTES = 4;
  localparam int unsigned REC_HDR_BYTES = 4;    // FF EE port length

  // Number of repeats of a failed send.
  localparam int unsigned SEND_RETRIES = 6;

  // One-cycle event flags brought out of the top for monitoring.
  typedef struct packed {
    logic pack_block;   // frame started because a port filled a block
    logic pack_timer;   // frame started by the 100 ms timer
    logic tx_ok;        // controller reported a good send
    logic tx_retry;     // send failed and is repeated
    logic tx_fail;      // send dropped after all repeats
    logic rx_frame;     // IP frame received and unpacked
    logic rx_error;     // controller header status not OK
    logic rx_other;     // ARP or other frame released unread
    logic rec_done;     // one record written to a port transmit buffer
    logic bad_port;     // record for a port that does not exist
  } gw_events_t;

endpackage
