// frame_unpacker: splits the payload of a received Ethernet frame into the
// port transmit buffers.
//
// The payload is a sequence of records FF | EE | port | n | n data bytes,
// the same layout the packer produces. start (one cycle) resets the parser
// at the beginning of a payload; bytes then arrive on in_valid/in_data and
// are taken when in_ready is high. For a record with n > 0 addressed to an
// existing port, the unpacker issues send_cmd with n + 2 to that port, then
// writes the sync heads FF and EE and the n data bytes into the port's
// transmit buffer, so the port sends the heads before the data. It stalls
// (in_ready low) while that buffer is full. Records for a port number of
// N_PORTS or above are read and dropped. A byte that is not a sync head where
// one is expected ends the useful part of the payload (Ethernet padding and
// CRC follow) and the rest is discarded. rec_done pulses per record.
// Choosing the port by its number and adding the sync heads follow the
// design; the record layout is this design's choice.
module frame_unpacker
  import gateway_pkg::*;
#(
  parameter int unsigned N_PORTS = 16,
  parameter int unsigned LEN_W   = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               in_valid,
  input  logic [7:0]         in_data,
  output logic               in_ready,
  input  logic [N_PORTS-1:0] tx_full,
  output logic [N_PORTS-1:0] tx_push,
  output logic [7:0]         tx_data,
  output logic [N_PORTS-1:0] send_cmd,
  output logic [LEN_W-1:0]   send_len,
  output logic               rec_done,
  output logic               bad_port
);
  typedef enum logic [2:0] {SYNC0, SYNC1, PORT, LEN, HEAD0, HEAD1, DATA, SKIP} state_t;
  state_t state;

  logic [7:0] port;
  logic [7:0] cnt;
  logic       port_ok;
  logic       full_now;
  logic       take;

  assign port_ok  = (port < 8'(N_PORTS));
  assign full_now = port_ok && tx_full[port[$clog2(N_PORTS)-1:0]];
  assign take     = in_valid && in_ready;

  always_comb begin
    in_ready = 1'b0;
    unique case (state)
      SYNC0, SYNC1, PORT, LEN, SKIP: in_ready = 1'b1;
      DATA:                          in_ready = !full_now;
      default:                       in_ready = 1'b0;
    endcase
  end

  always_comb begin
    tx_push  = '0;
    tx_data  = in_data;
    send_cmd = '0;
    send_len = LEN_W'(in_data) + LEN_W'(2);
    if (port_ok) begin
      unique case (state)
        LEN:   if (take && in_data != 8'd0) send_cmd[port[$clog2(N_PORTS)-1:0]] = 1'b1;
        HEAD0: begin tx_push[port[$clog2(N_PORTS)-1:0]] = !full_now; tx_data = SYNC_HEAD0; end
        HEAD1: begin tx_push[port[$clog2(N_PORTS)-1:0]] = !full_now; tx_data = SYNC_HEAD1; end
        DATA:  tx_push[port[$clog2(N_PORTS)-1:0]] = take;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= SKIP;
      port     <= '0;
      cnt      <= '0;
      rec_done <= 1'b0;
      bad_port <= 1'b0;
    end else begin
      rec_done <= 1'b0;
      bad_port <= 1'b0;
      if (start) state <= SYNC0;
      else begin
        unique case (state)
          SYNC0: if (take) state <= (in_data == SYNC_HEAD0) ? SYNC1 : SKIP;
          SYNC1: if (take) state <= (in_data == SYNC_HEAD1) ? PORT : SKIP;
          PORT:  if (take) begin
            port  <= in_data;
            state <= LEN;
          end
          LEN:   if (take) begin
            cnt <= in_data;
            if (in_data == 8'd0) state <= SYNC0;
            else if (port_ok) state <= HEAD0;
            else begin
              bad_port <= 1'b1;
              state    <= DATA;
            end
          end
          HEAD0: if (!full_now) state <= HEAD1;
          HEAD1: if (!full_now) state <= DATA;
          DATA:  if (take) begin
            cnt <= cnt - 1'b1;
            if (cnt == 8'd1) begin
              rec_done <= 1'b1;
              state    <= SYNC0;
            end
          end
          SKIP: ;
          default: state <= SKIP;
        endcase
      end
    end
  end
endmodule
