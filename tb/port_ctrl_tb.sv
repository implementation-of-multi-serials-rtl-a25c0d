// port_ctrl_tb: checks the control module of a port on its own. The
// receiver, the buffers and the transmitter are replaced by the testbench:
// it checks the register reset values (divider 1000, block size 10,
// receive enabled) and write/read back; that received bytes are pushed,
// stored in the receive buffer register and counted, with block_ready on
// the 10th and the counter restarting; that a disabled receiver pushes
// nothing; that block_clr clears the block; and that a send command moves
// exactly send_len bytes from the transmit buffer through the hold register
// and then sets the done flag.
module port_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [2:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0, cfg_rdata;
  logic [15:0] div;
  logic rx_valid = 1'b0;
  logic [7:0] rx_data = '0;
  logic rx_push, rx_full = 1'b0, block_ready, block_clr = 1'b0, rx_overflow;
  logic [7:0] rx_push_data;
  logic send_cmd = 1'b0;
  logic [8:0] send_len = '0;
  logic tx_empty, tx_pop, hold_full, hold_ack = 1'b0, tx_busy = 1'b0, send_done;
  logic [7:0] tx_dout, hold_data;
  int checks = 0, failures = 0;
  logic [7:0] txq [$];
  logic [7:0] sent [$];
  int npush = 0;

  port_ctrl #(.DIV_W(16), .BAUD_DIV(1000), .BLOCK_SIZE(10), .LEN_W(9)) dut (.*);

  always #5 clk = !clk;

  assign tx_empty = (txq.size() == 0);
  assign tx_dout  = tx_empty ? 8'h00 : txq[0];

  always @(posedge clk) begin
    if (rst_n && tx_pop) void'(txq.pop_front());
    if (rst_n && rx_push) npush++;
  end

  // transmitter stand-in: takes the hold register, stays busy 5 cycles
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && hold_full && !hold_ack && !tx_busy) begin
        sent.push_back(hold_data);
        hold_ack <= 1'b1; tx_busy <= 1'b1;
        @(posedge clk); hold_ack <= 1'b0;
        repeat (4) @(posedge clk);
        tx_busy <= 1'b0;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input logic [2:0] a, output logic [15:0] d);
    cfg_addr = a; #1; d = cfg_rdata;
  endtask

  task automatic wr(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk); cfg_addr = a; cfg_wdata = d; cfg_we = 1'b1;
    @(negedge clk); cfg_we = 1'b0;
  endtask

  task automatic rx_byte(input logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1'b1;
    @(negedge clk); rx_valid = 1'b0;
  endtask

  initial begin
    logic [15:0] d;
    int blocks;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rd(0, d); check(d == 16'd1000, $sformatf("baud register resets to 1000 (%0d)", d));
    check(div == 16'd1000, "divider output");
    rd(1, d); check(d == 16'd10, "block size resets to 10");
    rd(2, d); check(d == 16'd1, "receive enabled after reset");
    wr(0, 16'd500); rd(0, d); check(d == 16'd500 && div == 16'd500, "baud register write");
    wr(0, 16'd1000);
    // receive 25 bytes: blocks at 10 and 20
    blocks = 0;
    for (int i = 0; i < 25; i++) begin
      rx_byte(8'(i + 8'h30));
      if (block_ready) blocks++;
      if (i == 9) check(block_ready, "block_ready on the 10th byte");
      if (i == 8) check(!block_ready, "no block_ready before the 10th byte");
      if (i == 9) begin
        @(negedge clk); block_clr = 1'b1; @(negedge clk); block_clr = 1'b0;
        check(!block_ready, "block_clr clears block_ready");
      end
    end
    check(npush == 25, $sformatf("25 bytes pushed (%0d)", npush));
    rd(6, d); check(d == 16'h48, "receive buffer register holds the last byte");
    rd(5, d); check(d == 16'd5, $sformatf("receive counter 5 after 25 bytes (%0d)", d));
    check(block_ready, "second block ready after byte 20");
    // receive disabled
    wr(2, 16'd0);
    rx_byte(8'h99);
    check(npush == 25, "disabled receiver pushes nothing");
    wr(2, 16'd1);
    // overflow flag
    rx_full = 1'b1; rx_byte(8'h11); rx_full = 1'b0;
    check(rx_overflow, "byte into a full buffer sets overflow");
    // send 4 bytes out of 6 queued
    for (int i = 0; i < 6; i++) txq.push_back(8'(8'hA0 + i));
    @(negedge clk); send_len = 9'd4; send_cmd = 1'b1;
    @(negedge clk); send_cmd = 1'b0;
    check(!send_done, "done flag cleared by a send command");
    repeat (100) @(negedge clk);
    check(sent.size() == 4, $sformatf("4 bytes sent (%0d)", sent.size()));
    for (int i = 0; i < 4 && i < sent.size(); i++) check(sent[i] == 8'(8'hA0 + i), "sent byte order");
    check(txq.size() == 2, "2 bytes left in the transmit buffer");
    check(send_done, "done flag set when the send counter reaches 0");
    rd(4, d); check(d == 0, "send counter 0");
    rd(3, d); check(d[0] == 1'b1, "done flag visible in the state register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
