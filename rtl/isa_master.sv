// isa_master: I/O read and write cycles on the ISA bus of the Ethernet
// controller.
//
// The FPGA is bus master: it drives the address SA[15:0], drives the data
// SD[7:0] on writes (sd_oe high) and reads it on reads, and strobes IORB
// (read) or IOWB (write), both active low. A request (req with we, the
// register offset off and wdata) is accepted in IDLE; the address is
// IO_BASE + off. The cycle lasts SETUP cycles of address (and data) set-up,
// STROBE cycles with the strobe low, at whose last cycle read data is
// sampled, and HOLD cycles with the strobe high before done pulses with
// rdata valid. busy is high from the request to done. The bus signals and
// the strobes follow the hardware diagram of the design; the I/O base and
// the cycle timing are this design's choices (at 19.2 MHz the defaults give
// a 208 ns strobe).
module isa_master #(
  parameter logic [15:0] IO_BASE = 16'h0300,
  parameter int unsigned SETUP   = 1,
  parameter int unsigned STROBE  = 4,
  parameter int unsigned HOLD    = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [4:0]  off,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        done,
  output logic        busy,
  // ISA bus
  output logic [15:0] sa,
  output logic [7:0]  sd_o,
  output logic        sd_oe,
  input  logic [7:0]  sd_i,
  output logic        iorb,
  output logic        iowb
);
  typedef enum logic [1:0] {IDLE, SET, STRB, HLD} state_t;
  state_t state;
  logic   we_q;
  logic [7:0] cnt;

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      we_q  <= 1'b0;
      cnt   <= '0;
      sa    <= IO_BASE;
      sd_o  <= '0;
      sd_oe <= 1'b0;
      iorb  <= 1'b1;
      iowb  <= 1'b1;
      rdata <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          sd_oe <= 1'b0;
          if (req) begin
            we_q  <= we;
            sa    <= IO_BASE + 16'(off);
            sd_o  <= wdata;
            sd_oe <= we;
            cnt   <= '0;
            state <= SET;
          end
        end
        SET: begin
          if (32'(cnt) + 1 >= SETUP) begin
            cnt   <= '0;
            iorb  <= we_q;
            iowb  <= !we_q;
            state <= STRB;
          end else cnt <= cnt + 1'b1;
        end
        STRB: begin
          if (32'(cnt) + 1 >= STROBE) begin
            cnt   <= '0;
            iorb  <= 1'b1;
            iowb  <= 1'b1;
            if (!we_q) rdata <= sd_i;
            state <= HLD;
          end else cnt <= cnt + 1'b1;
        end
        HLD: begin
          if (32'(cnt) + 1 >= HOLD) begin
            cnt   <= '0;
            done  <= 1'b1;
            sd_oe <= 1'b0;
            state <= IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
