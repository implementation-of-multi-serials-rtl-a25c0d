// baud_gen_tb: checks the baud divider. For several divisors it measures
// the distance between ticks (must equal div), the high and low times of
// baud_clk (div/2 high, the rest low), that no tick comes while disabled,
// and that the first tick is the div-th enabled cycle. The 19200 bit/s
// setting (div = 1000) is checked for its period of 1000 cycles.
module baud_gen_tb;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [15:0] div = 16'd10;
  logic baud_clk, tick;
  int checks = 0, failures = 0;

  baud_gen #(.DIV_W(16)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(input int d);
    int first, last, hi, lo, n;
    @(negedge clk); en = 1'b0; div = 16'(d);
    repeat (3) @(negedge clk);
    check(!tick, "no tick while disabled");
    en = 1'b1;
    first = 0;
    // first tick
    for (int c = 1; c <= d + 2; c++) begin
      if (tick) begin first = c; break; end
      @(negedge clk);
    end
    check(first == d, $sformatf("first tick after %0d enabled cycles, want %0d", first, d));
    // periods and duty over 4 periods
    hi = 0; lo = 0; n = 0; last = 0;
    for (int c = 1; c <= 4 * d; c++) begin
      @(negedge clk);
      if (baud_clk) hi++; else lo++;
      if (tick) begin
        n++;
        if (last != 0) check(c - last == d, $sformatf("tick period %0d, want %0d", c - last, d));
        last = c;
      end
    end
    check(n == 4, $sformatf("div %0d: %0d ticks in 4 periods", d, n));
    check(hi == 4 * (d / 2), $sformatf("div %0d: high time %0d, want %0d", d, hi, 4 * (d / 2)));
    check(lo == 4 * (d - d / 2), $sformatf("div %0d: low time %0d", d, lo));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    measure(10);
    measure(7);
    measure(2);
    measure(1000);   // 19.2 MHz / 1000 = 19200 bit/s
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
