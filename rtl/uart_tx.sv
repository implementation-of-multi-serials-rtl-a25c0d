// uart_tx: transmit state machine of a serial port (8 data bits, no parity,
// one stop bit, least significant bit first).
//
// In IDLE the transmitter waits while the data (send hold) register is not
// full. When it is full (hold_full), the byte is copied into the 8-bit shift
// register, hold_ack empties the data register for one cycle, the start bit
// is driven and the baud divider is started. SHIFT sends the start bit and
// the eight data bits, one per baud tick; STOP sends the stop bit for one bit
// time; if the data register is full again by then, the next byte's start
// bit follows at once, otherwise the state machine returns to IDLE. A byte
// occupies the line for exactly 10 x div cycles, so back-to-back bytes run
// at the full baud rate. The three states and their transitions follow
// the send state diagram of the design; the handshake is this design's own.
module uart_tx #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div,        // clock cycles per bit
  input  logic [7:0]       hold_data,  // send hold register
  input  logic             hold_full,
  output logic             hold_ack,   // one cycle: hold register taken
  output logic             txd,
  output logic             busy
);
  typedef enum logic [1:0] {IDLE, SHIFT, STOP} state_t;
  state_t state;

  logic [8:0] shreg;   // start bit + 8 data bits
  logic [3:0] bitn;
  logic       tick;
  logic       baud_clk;

  baud_gen #(.DIV_W(DIV_W)) u_baud (
    .clk, .rst_n, .en(state != IDLE), .div, .baud_clk, .tick
  );

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      shreg    <= '1;
      bitn     <= '0;
      txd      <= 1'b1;
      hold_ack <= 1'b0;
    end else begin
      hold_ack <= 1'b0;
      case (state)
        IDLE: begin
          txd <= 1'b1;
          if (hold_full && !hold_ack) begin     // register is full
            shreg    <= {hold_data, 1'b0};
            txd      <= 1'b0;
            hold_ack <= 1'b1;
            bitn     <= '0;
            state    <= SHIFT;
          end
        end
        SHIFT: if (tick) begin
          if (bitn == 4'd8) begin
            txd   <= 1'b1;                      // stop bit
            state <= STOP;
          end else begin
            txd   <= shreg[bitn + 1'b1];
            bitn  <= bitn + 1'b1;
          end
        end
        STOP: if (tick) begin
          if (hold_full && !hold_ack) begin     // next byte waiting
            shreg    <= {hold_data, 1'b0};
            txd      <= 1'b0;
            hold_ack <= 1'b1;
            bitn     <= '0;
            state    <= SHIFT;
          end else begin
            txd   <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
