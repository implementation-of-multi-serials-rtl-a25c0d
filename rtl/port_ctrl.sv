// port_ctrl: control module of one serial port.
//
// Holds the port's registers and coordinates its receiver, transmitter and
// I/O buffers. Registers, read and written over a small local bus
// (cfg_we/cfg_addr/cfg_wdata, cfg_rdata is combinational):
//   0 send baud rate control  RW  clock cycles per bit, reset BAUD_DIV
//                                 (1000 gives 19200 bit/s at 19.2 MHz)
//   1 receive block size      RW  bytes per block, reset BLOCK_SIZE (10)
//   2 receive enable control  RW  bit 0, reset 1
//   3 send control and state  R   {.., rx overflow, hold full, busy, done}
//   4 send counter            R   bytes still to send
//   5 receive counter         R   bytes of the current block
//   6 receive buffer register R   last byte received
//   7 send hold register      R   byte waiting for the shift register
// Receiving: every valid byte from the receiver (when enabled) is stored in
// the receive buffer register, written to the receive I/O buffer and
// counted; when the receive counter reaches the block size, block_ready is
// raised and the counter restarts. block_clr (from the packer, when it has
// taken the port's data) clears block_ready and the counter.
// Sending: send_cmd adds send_len to the send counter and clears the done
// flag. While the counter is non-zero and the send hold register is empty,
// one byte is moved from the transmit I/O buffer into the hold register and
// the counter decrements. When the counter is zero and the transmitter has
// finished, the done flag is set.
// The register set is the one the design lists for a port; the addresses,
// the local bus and the bit layout of the state register are this design's.
module port_ctrl #(
  parameter int unsigned DIV_W      = 16,
  parameter int unsigned BAUD_DIV   = 1000,
  parameter int unsigned BLOCK_SIZE = 10,
  parameter int unsigned LEN_W      = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  // local register bus
  input  logic             cfg_we,
  input  logic [2:0]       cfg_addr,
  input  logic [15:0]      cfg_wdata,
  output logic [15:0]      cfg_rdata,
  output logic [DIV_W-1:0] div,
  // receiver side
  input  logic             rx_valid,
  input  logic [7:0]       rx_data,
  output logic             rx_push,
  output logic [7:0]       rx_push_data,
  input  logic             rx_full,
  output logic             block_ready,
  input  logic             block_clr,
  output logic             rx_overflow,
  // send command from the Ethernet side
  input  logic             send_cmd,
  input  logic [LEN_W-1:0] send_len,
  // transmit I/O buffer
  input  logic             tx_empty,
  input  logic [7:0]       tx_dout,
  output logic             tx_pop,
  // transmitter
  output logic [7:0]       hold_data,
  output logic             hold_full,
  input  logic             hold_ack,
  input  logic             tx_busy,
  output logic             send_done
);
  logic [7:0]       block_size;
  logic             rx_en;
  logic [LEN_W+3:0] send_cnt;
  logic [7:0]       rx_cnt;
  logic [7:0]       rx_buf;
  logic             active;

  assign rx_push      = rx_valid && rx_en;
  assign rx_push_data = rx_data;
  assign tx_pop       = !hold_full && (send_cnt != '0) && !tx_empty;

  always_comb begin
    unique case (cfg_addr)
      3'd0: cfg_rdata = 16'(div);
      3'd1: cfg_rdata = 16'(block_size);
      3'd2: cfg_rdata = 16'(rx_en);
      3'd3: cfg_rdata = {12'd0, rx_overflow, hold_full, tx_busy, send_done};
      3'd4: cfg_rdata = 16'(send_cnt);
      3'd5: cfg_rdata = 16'(rx_cnt);
      3'd6: cfg_rdata = 16'(rx_buf);
      3'd7: cfg_rdata = 16'(hold_data);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div         <= DIV_W'(BAUD_DIV);
      block_size  <= 8'(BLOCK_SIZE);
      rx_en       <= 1'b1;
      rx_cnt      <= '0;
      rx_buf      <= '0;
      block_ready <= 1'b0;
      rx_overflow <= 1'b0;
      send_cnt    <= '0;
      hold_data   <= '0;
      hold_full   <= 1'b0;
      send_done   <= 1'b0;
      active      <= 1'b0;
    end else begin
      // registers
      if (cfg_we) begin
        case (cfg_addr)
          3'd0: div        <= cfg_wdata[DIV_W-1:0];
          3'd1: block_size <= cfg_wdata[7:0];
          3'd2: rx_en      <= cfg_wdata[0];
          default: ;
        endcase
      end
      // receive counting
      if (rx_push) begin
        rx_buf <= rx_data;
        if (rx_full) rx_overflow <= 1'b1;
      end
      if (block_clr) begin
        block_ready <= 1'b0;
        rx_cnt      <= rx_push ? 8'd1 : 8'd0;
      end else if (rx_push) begin
        if (rx_cnt + 8'd1 >= block_size) begin
          rx_cnt      <= '0;
          block_ready <= 1'b1;
        end else rx_cnt <= rx_cnt + 8'd1;
      end
      // send counter and hold register
      send_cnt <= send_cnt + (send_cmd ? (LEN_W+4)'(send_len) : '0)
                           - (tx_pop ? (LEN_W+4)'(1) : '0);
      if (tx_pop) begin
        hold_data <= tx_dout;
        hold_full <= 1'b1;
      end else if (hold_ack) hold_full <= 1'b0;
      // done flag
      if (send_cmd) begin
        send_done <= 1'b0;
        active    <= 1'b1;
      end else if (active && send_cnt == '0 && !hold_full && !tx_busy && !hold_ack) begin
        send_done <= 1'b1;
        active    <= 1'b0;
      end
    end
  end
endmodule
