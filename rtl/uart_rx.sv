// uart_rx: receive state machine of a serial port (8 data bits, no parity,
// one stop bit, least significant bit first).
//
// The line is synchronised with two flip-flops. In IDLE a low level starts a
// bit counter; half a bit later, in START_CHK, the line is sampled again: a
// high level is an invalid start bit and returns to IDLE. Otherwise eight
// data bits are sampled one bit time apart into an 8-bit shift register, and
// in STOP_CHK the stop bit is sampled: low is an invalid stop bit (frame
// dropped, back to IDLE), high is valid data, which moves to DATA_OK. DATA_OK
// hands the byte on (valid is high for one cycle) and returns to IDLE.
// The states and their transitions (idle, start?, stop?, data correct, send
// to buffers) follow the receive state diagram of the design; the
// mid-bit sampling with a counter of div cycles per bit is this design's
// choice of how to sample. A frame takes 9.5 bit times from the falling edge
// to valid, plus two cycles of synchronisation.
module uart_rx #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div,        // clock cycles per bit
  input  logic             rxd,
  output logic [7:0]       data,
  output logic             valid,      // one cycle, data holds the byte
  output logic             err_start,  // one cycle: invalid start bit
  output logic             err_stop    // one cycle: invalid stop bit
);
  typedef enum logic [2:0] {IDLE, START_CHK, SAMPLE, STOP_CHK, DATA_OK} state_t;
  state_t state;

  logic [1:0]       sync;
  logic             rx;
  logic [DIV_W-1:0] cnt;
  logic [2:0]       bitn;
  logic [7:0]       shreg;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      err_start <= 1'b0;
      err_stop  <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      err_start <= 1'b0;
      err_stop  <= 1'b0;
      case (state)
        IDLE: begin
          cnt <= '0;
          if (!rx) state <= START_CHK;   // no start bit: stay
        end
        START_CHK: begin
          if (cnt + 1'b1 >= (div >> 1)) begin
            cnt <= '0;
            if (rx) begin
              state     <= IDLE;         // invalid start bit
              err_start <= 1'b1;
            end else begin
              state <= SAMPLE;
              bitn  <= '0;
            end
          end else cnt <= cnt + 1'b1;
        end
        SAMPLE: begin
          if (cnt + 1'b1 >= div) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= STOP_CHK;
          end else cnt <= cnt + 1'b1;
        end
        STOP_CHK: begin
          if (cnt + 1'b1 >= div) begin
            cnt <= '0;
            if (rx) state <= DATA_OK;    // valid data
            else begin
              state    <= IDLE;          // invalid stop bit
              err_stop <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        DATA_OK: begin                   // send to buffers
          data  <= shreg;
          valid <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
