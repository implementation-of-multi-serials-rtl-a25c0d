// uart_tx_tb: offers bytes to the transmitter through the send hold
// register handshake and decodes the line with an independent receiver
// sampling each bit in its middle. Checks the bytes, the start and stop
// bits, that each byte takes exactly 10 bit times when bytes follow one
// another, that the line idles high, and that busy drops when done.
module uart_tx_tb;
  localparam int DIV = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] div = 16'(DIV);
  logic [7:0] hold_data = '0;
  logic hold_full = 1'b0;
  logic hold_ack, txd, busy;
  int checks = 0, failures = 0;
  logic [7:0] exp [$];
  logic [7:0] got [$];
  longint starts [$];
  longint cyc = 0;
  int nacks = 0;

  uart_tx #(.DIV_W(16)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // producer: keeps the hold register full from a list
  logic [7:0] src [$];
  always @(posedge clk) begin
    if (!rst_n) hold_full <= 1'b0;
    else if (hold_ack) begin hold_full <= 1'b0; nacks++; end
    else if (!hold_full && src.size() > 0) begin
      hold_data <= src.pop_front();
      hold_full <= 1'b1;
    end
  end

  // independent line decoder
  initial begin
    forever begin
      @(negedge txd);
      starts.push_back(cyc);
      repeat (DIV / 2) @(posedge clk);
      if (txd != 1'b0) begin failures++; $display("FAIL: start bit not low"); end
      begin
        logic [7:0] b;
        for (int i = 0; i < 8; i++) begin
          repeat (DIV) @(posedge clk);
          b[i] = txd;
        end
        repeat (DIV) @(posedge clk);
        checks++;
        if (txd != 1'b1) begin failures++; $display("FAIL: stop bit not high"); end
        got.push_back(b);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(txd == 1'b1 && !busy, "line idles high");
    for (int k = 0; k < 6; k++) begin
      logic [7:0] b;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      exp.push_back(b);
      src.push_back(b);
    end
    wait (got.size() == 6);
    repeat (2 * DIV) @(negedge clk);
    check(!busy && txd == 1'b1, "idle after last byte");
    check(nacks == 6, $sformatf("six hold register handshakes, saw %0d", nacks));
    for (int k = 0; k < 6; k++)
      check(got[k] == exp[k], $sformatf("byte %0d: got %02h want %02h", k, got[k], exp[k]));
    for (int k = 1; k < 6; k++)
      check(starts[k] - starts[k-1] == 10 * DIV,
            $sformatf("byte %0d started %0d cycles after the previous, want %0d",
                      k, starts[k] - starts[k-1], 10 * DIV));
    // a lone byte after idle
    src.push_back(8'h81); exp.push_back(8'h81);
    wait (got.size() == 7);
    check(got[6] == 8'h81, "lone byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
