// io_buffer: data I/O buffer between a serial port and the Ethernet side.
//
// A synchronous first-in first-out byte buffer of DEPTH entries (a power of
// two) held in a memory array. The head entry is always visible on dout
// (first-word fall-through); pop removes it. push writes din unless the
// buffer is full; push and pop may happen in the same cycle. count is the
// number of stored bytes. Writing when full or reading when empty is
// ignored. The document names the buffer and its role; the depth and the
// FIFO organisation are this design's choices.
module io_buffer #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  logic [7:0]  din,
  input  logic        pop,
  output logic [7:0]  dout,
  output logic        empty,
  output logic        full,
  output logic [AW:0] count
);
  logic [7:0]  mem [DEPTH];
  logic [AW:0] wp, rp;
  logic        do_push, do_pop;

  assign empty   = (wp == rp);
  assign full    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign count   = wp - rp;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end
endmodule
