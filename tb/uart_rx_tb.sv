// uart_rx_tb: drives serial frames (8N1, LSB first, DIV cycles per bit)
// into the receiver and checks the received bytes, that valid comes 9.5 bit
// times (within a few cycles) after the start edge, that a short low glitch
// is rejected as an invalid start bit and that a frame whose stop bit is low
// is rejected as an invalid stop bit, without a valid strobe.
module uart_rx_tb;
  localparam int DIV = 16;
  logic clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic [15:0] div = 16'(DIV);
  logic [7:0] data;
  logic valid, err_start, err_stop;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr_start = 0, nerr_stop = 0;
  logic [7:0] got [$];
  longint t_valid [$];
  longint cyc = 0;

  uart_rx #(.DIV_W(16)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (valid) begin nvalid++; got.push_back(data); t_valid.push_back(cyc); end
    if (err_start) nerr_start++;
    if (err_stop) nerr_stop++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input bit stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (DIV) @(negedge clk);
    end
    rxd = 1'b1;
  endtask

  initial begin
    logic [7:0] exp [$];
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      logic [7:0] b;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : (k == 2) ? 8'hA5 : 8'($urandom);
      exp.push_back(b);
      t0 = cyc;
      send(b, 1'b1);
      repeat (3) @(negedge clk);
      check(t_valid.size() == k + 1, $sformatf("byte %0d received", k));
      if (t_valid.size() == k + 1) begin
        longint lat;
        lat = t_valid[k] - t0;
        check(lat >= (19 * DIV) / 2 && lat <= (19 * DIV) / 2 + 4,
              $sformatf("latency %0d cycles, want 9.5 bit times", lat));
      end
    end
    for (int k = 0; k < exp.size(); k++)
      check(k < got.size() && got[k] == exp[k], $sformatf("byte %0d: got %02h want %02h",
            k, (k < got.size()) ? got[k] : 8'h0, exp[k]));
    // glitch shorter than half a bit: invalid start bit
    rxd = 1'b0; repeat (DIV / 4) @(negedge clk); rxd = 1'b1;
    repeat (2 * DIV) @(negedge clk);
    check(nerr_start == 1, "short glitch reported as invalid start bit");
    check(nvalid == 12, "no byte from a glitch");
    // low stop bit: invalid stop bit
    send(8'h3C, 1'b0);
    repeat (2 * DIV) @(negedge clk);
    check(nerr_stop == 1, "low stop bit reported");
    check(nvalid == 12, "no byte from a frame with a bad stop bit");
    // good frame afterwards
    repeat (DIV) @(negedge clk);
    send(8'h5A, 1'b1);
    repeat (3) @(negedge clk);
    check(nvalid == 13 && got[12] == 8'h5A, "receiver recovers after errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
