// serial_port_tb: one complete port. Serial frames driven on rxd must appear
// in order in the receive buffer, with block_ready once BLOCK_SIZE bytes
// are in; bytes pushed into the transmit buffer with a send command must
// appear on txd (decoded independently) at 10 bit times per byte, and the
// done flag must follow. Also checks the baud register changes the rate.
module serial_port_tb;
  localparam int DIV = 16;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1, txd;
  logic cfg_we = 1'b0;
  logic [2:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0, cfg_rdata;
  logic rx_pop = 1'b0;
  logic [7:0] rx_dout;
  logic [3:0] rx_count;
  logic block_ready, block_clr = 1'b0;
  logic tx_push = 1'b0, tx_full, send_cmd = 1'b0;
  logic [7:0] tx_din = '0;
  logic [8:0] send_len = '0;
  logic send_done, rx_overflow, rx_err;
  int checks = 0, failures = 0;
  int bit_cycles = DIV;
  logic [7:0] got [$];
  longint starts [$];
  longint cyc = 0;

  serial_port #(.BAUD_DIV(DIV), .BLOCK_SIZE(4), .BUF_DEPTH(8)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_serial(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (bit_cycles) @(negedge clk);
    end
  endtask

  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      starts.push_back(cyc);
      repeat (bit_cycles / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (bit_cycles) @(posedge clk);
        b[i] = txd;
      end
      repeat (bit_cycles) @(posedge clk);
      checks++;
      if (!txd) begin failures++; $display("FAIL: stop bit"); end
      got.push_back(b);
    end
  end

  initial begin
    logic [7:0] exp [$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    // receive 5 bytes
    for (int i = 0; i < 5; i++) begin
      exp.push_back(8'($urandom));
      send_serial(exp[i]);
      if (i == 2) check(!block_ready, "no block after 3 bytes");
      if (i == 3) begin
        repeat (2) @(negedge clk);
        check(block_ready, "block ready after 4 bytes");
      end
    end
    repeat (3) @(negedge clk);
    check(rx_count == 4'd5, $sformatf("5 bytes buffered (%0d)", rx_count));
    for (int i = 0; i < 5; i++) begin
      check(rx_dout == exp[i], $sformatf("received byte %0d %02h want %02h", i, rx_dout, exp[i]));
      @(negedge clk); rx_pop = 1'b1; @(negedge clk); rx_pop = 1'b0;
    end
    @(negedge clk); block_clr = 1'b1; @(negedge clk); block_clr = 1'b0;
    check(!block_ready && rx_count == 0, "drained");
    // transmit 6 bytes
    exp.delete();
    for (int i = 0; i < 6; i++) begin
      exp.push_back(8'($urandom));
      @(negedge clk); tx_din = exp[i]; tx_push = 1'b1;
      if (i == 0) begin send_cmd = 1'b1; send_len = 9'd6; end
      @(negedge clk); tx_push = 1'b0; send_cmd = 1'b0;
    end
    wait (got.size() == 6);
    repeat (2 * DIV) @(negedge clk);
    for (int i = 0; i < 6; i++) check(got[i] == exp[i], $sformatf("sent byte %0d", i));
    for (int i = 1; i < 6; i++)
      check(starts[i] - starts[i-1] == 10 * DIV, "back-to-back bytes at 10 bit times");
    check(send_done, "send done flag");
    // change baud rate to 2*DIV and send one byte
    @(negedge clk); cfg_addr = 3'd0; cfg_wdata = 16'(2 * DIV); cfg_we = 1'b1;
    @(negedge clk); cfg_we = 1'b0;
    bit_cycles = 2 * DIV;
    @(negedge clk); tx_din = 8'hC3; tx_push = 1'b1; send_cmd = 1'b1; send_len = 9'd1;
    @(negedge clk); tx_push = 1'b0; send_cmd = 1'b0;
    wait (got.size() == 7);
    check(got[6] == 8'hC3, "byte at the new baud rate");
    send_serial(8'h5E);
    repeat (3) @(negedge clk);
    check(rx_count == 1 && rx_dout == 8'h5E, "receive at the new baud rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
