// baud_gen: baud-rate clock divider of a serial port.
//
// The system clock (19.2 MHz) is divided by the value of the send baud rate
// control register: writing 1000 gives 19200 bit/s. A counter runs from 0 to
// div-1 and restarts; baud_clk is high in the first half of the count and
// low in the second half, so it toggles at div/2 and again at div and has a
// 50% duty cycle (for an odd div the low half is one cycle longer). tick is a
// combinational one-cycle pulse in the last cycle of every period, so that
// logic clocked by clk acts on it at the same edge at which baud_clk rises;
// it is what the transmitter shifts on. While en is low the counter is held
// at zero; the first tick is the div-th cycle with en high.
// The counting scheme follows the design description; the enable and the
// tick output are this design's choices, which keep everything on one clock.
module baud_gen #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [DIV_W-1:0] div,      // clock cycles per bit, at least 2
  output logic             baud_clk,
  output logic             tick
);
  logic [DIV_W-1:0] cnt;
  logic [DIV_W-1:0] cnt_nxt;

  assign cnt_nxt = cnt + 1'b1;
  assign tick    = en && (cnt_nxt >= div);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      baud_clk <= 1'b1;
    end else if (!en) begin
      cnt      <= '0;
      baud_clk <= 1'b1;
    end else begin
      if (tick) begin
        cnt      <= '0;
        baud_clk <= 1'b1;
      end else begin
        cnt <= cnt_nxt;
        if (cnt_nxt == (div >> 1)) baud_clk <= 1'b0;
      end
    end
  end
endmodule
