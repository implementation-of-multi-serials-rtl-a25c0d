// frame_packer: packages received serial data into Ethernet frames.
//
// A port's data is not sent byte by byte. Each port's control module raises
// block_ready once BLOCK_SIZE (10) correct characters have arrived, and a
// period timer expires every PACK_PERIOD cycles (100 ms at 19.2 MHz). Either
// event starts a frame: on a block it starts at once, on the timer only if
// some port holds data. The packer then writes into its frame buffer, a
// FB_BYTES memory array:
//   destination MAC (6) | source MAC (6) | type (2)
//   for every port p holding n > 0 bytes, in port order:
//     FF | EE | p | n | n data bytes taken from the port's receive buffer
//   zero padding up to 60 bytes
// n is the port's fill level when the packer reaches it (at most 255). The
// frame is then offered to the controller driver (frame_valid, frame_len);
// the buffer is read through fb_raddr/fb_rdata (combinational read) and is
// released by frame_done. One byte is written per cycle; a frame of B bytes
// is ready about B + N_PORTS cycles after the trigger. pack_block and
// pack_timer pulse for one cycle when a frame is started by each cause.
// The two triggers, the sync heads FF EE and the role of the buffer follow
// the design; the record layout (port number and length after the sync
// heads), the MAC addresses and the type field are this design's choices.
module frame_packer
  import gateway_pkg::*;
#(
  parameter int unsigned N_PORTS     = 16,
  parameter int unsigned AW          = 6,          // log2 of a port buffer depth
  parameter int unsigned FB_BYTES    = 1536,
  parameter int unsigned FB_AW       = 11,
  parameter int unsigned PACK_PERIOD = 1_920_000,  // 100 ms at 19.2 MHz
  parameter logic [47:0] DST_MAC     = 48'hFFFF_FFFF_FFFF,
  parameter logic [47:0] SRC_MAC     = 48'h0200_0000_0001,
  parameter logic [15:0] ETH_TYPE    = ETH_TYPE_IP
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // port receive buffers
  input  logic [N_PORTS-1:0][AW:0]       rx_count,
  input  logic [N_PORTS-1:0][7:0]        rx_dout,
  input  logic [N_PORTS-1:0]             block_ready,
  output logic [N_PORTS-1:0]             rx_pop,
  output logic [N_PORTS-1:0]             block_clr,
  // frame buffer towards the driver
  input  logic [FB_AW-1:0]               fb_raddr,
  output logic [7:0]                     fb_rdata,
  output logic                           frame_valid,
  output logic [FB_AW-1:0]               frame_len,
  input  logic                           frame_done,
  // events
  output logic                           pack_block,
  output logic                           pack_timer
);
  localparam int unsigned PW = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  typedef enum logic [2:0] {IDLE, HDR, SCAN, REC, DATA, PAD, SEND} state_t;
  state_t state;

  logic [7:0]       mem [FB_BYTES];
  logic [FB_AW-1:0] wptr;
  logic [3:0]       hidx;
  logic [1:0]       ridx;
  logic [PW-1:0]    p;
  logic [7:0]       n;
  logic [31:0]      timer;
  logic             timer_flag;
  logic             any_data;
  logic             we;
  logic [7:0]       wbyte;

  function automatic logic [7:0] hdr_byte(input logic [3:0] i);
    logic [111:0] h;
    h = {DST_MAC, SRC_MAC, ETH_TYPE};
    return h[111 - 8*i -: 8];
  endfunction

  always_comb begin
    any_data = 1'b0;
    for (int i = 0; i < N_PORTS; i++) if (rx_count[i] != '0) any_data = 1'b1;
  end

  assign fb_rdata    = mem[fb_raddr];
  assign frame_valid = (state == SEND);
  assign frame_len   = wptr;

  // write data of the current cycle
  always_comb begin
    we     = 1'b0;
    wbyte  = '0;
    rx_pop = '0;
    block_clr = '0;
    unique case (state)
      HDR:  begin we = 1'b1; wbyte = hdr_byte(hidx); end
      SCAN: if (rx_count[p] != '0) block_clr[p] = 1'b1;
      REC:  begin
        we = 1'b1;
        unique case (ridx)
          2'd0: wbyte = SYNC_HEAD0;
          2'd1: wbyte = SYNC_HEAD1;
          2'd2: wbyte = 8'(p);
          2'd3: wbyte = n;
        endcase
      end
      DATA: begin we = 1'b1; wbyte = rx_dout[p]; rx_pop[p] = 1'b1; end
      PAD:  we = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) mem[wptr] <= wbyte;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      wptr       <= '0;
      hidx       <= '0;
      ridx       <= '0;
      p          <= '0;
      n          <= '0;
      timer      <= '0;
      timer_flag <= 1'b0;
      pack_block <= 1'b0;
      pack_timer <= 1'b0;
    end else begin
      pack_block <= 1'b0;
      pack_timer <= 1'b0;
      // 100 ms period timer
      if (timer + 1 >= PACK_PERIOD) begin
        timer      <= '0;
        timer_flag <= 1'b1;
      end else timer <= timer + 1;

      unique case (state)
        IDLE: begin
          if (|block_ready || (timer_flag && any_data)) begin
            pack_block <= |block_ready;
            pack_timer <= !(|block_ready);
            timer_flag <= 1'b0;
            wptr       <= '0;
            hidx       <= '0;
            state      <= HDR;
          end else if (timer_flag) timer_flag <= 1'b0;   // nothing to flush
        end
        HDR: begin
          wptr <= wptr + 1'b1;
          hidx <= hidx + 1'b1;
          if (hidx == 4'(ETH_HDR_BYTES - 1)) begin
            p     <= '0;
            state <= SCAN;
          end
        end
        SCAN: begin
          if (rx_count[p] != '0) begin
            n     <= (32'(rx_count[p]) > 255) ? 8'd255 : 8'(rx_count[p]);
            ridx  <= '0;
            state <= REC;
          end else if (p == PW'(N_PORTS - 1)) state <= PAD;
          else p <= p + 1'b1;
        end
        REC: begin
          wptr <= wptr + 1'b1;
          ridx <= ridx + 1'b1;
          if (ridx == 2'd3) state <= DATA;
        end
        DATA: begin
          wptr <= wptr + 1'b1;
          n    <= n - 1'b1;
          if (n == 8'd1) begin
            if (p == PW'(N_PORTS - 1)) state <= PAD;
            else begin
              p     <= p + 1'b1;
              state <= SCAN;
            end
          end
        end
        PAD: begin
          if (wptr >= FB_AW'(ETH_MIN_BYTES)) state <= SEND;
          else wptr <= wptr + 1'b1;
        end
        SEND: if (frame_done) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
