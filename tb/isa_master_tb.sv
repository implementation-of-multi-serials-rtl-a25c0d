// isa_master_tb: issues register writes and reads and watches the bus with
// an independent monitor. Checks the address (I/O base + offset), that
// the data is driven for the whole write strobe, that each strobe is low
// for exactly STROBE cycles with the other strobe high, that read data
// sampled from the bus is returned, and that done comes once per request.
module isa_master_tb;
  localparam int STROBE = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, we = 1'b0;
  logic [4:0] off = '0;
  logic [7:0] wdata = '0, rdata, sd_o, sd_i;
  logic done, busy, sd_oe, iorb, iowb;
  logic [15:0] sa;
  int checks = 0, failures = 0;
  int low_r = 0, low_w = 0, ndone = 0;
  logic [7:0] bus_w [$];
  logic [15:0] addr_w [$];
  logic [15:0] addr_r [$];
  int wid_w [$];
  int wid_r [$];

  isa_master #(.IO_BASE(16'h0300), .SETUP(1), .STROBE(STROBE), .HOLD(1)) dut (.*);

  always #5 clk = !clk;
  // the slave answers with a function of the address
  assign sd_i = (!iorb) ? (sa[7:0] ^ 8'h5A) : 8'h00;

  always @(posedge clk) if (rst_n) begin
    if (done) ndone++;
    if (!iorb && !iowb) begin failures++; $display("FAIL: both strobes low"); end
    if (!iowb) begin
      if (low_w == 0) begin bus_w.push_back(sd_o); addr_w.push_back(sa); end
      else if (!sd_oe || sd_o != bus_w[$]) begin failures++; $display("FAIL: data not held"); end
      low_w++;
    end else if (low_w != 0) begin wid_w.push_back(low_w); low_w = 0; end
    if (!iorb) begin
      if (sd_oe) begin failures++; $display("FAIL: driving during read"); end
      if (low_r == 0) addr_r.push_back(sa);
      low_r++;
    end else if (low_r != 0) begin wid_r.push_back(low_r); low_r = 0; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(input logic w, input logic [4:0] o, input logic [7:0] d);
    @(negedge clk); req = 1'b1; we = w; off = o; wdata = d;
    @(negedge clk); req = 1'b0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(iorb && iowb && !sd_oe, "bus idle after reset");
    for (int i = 0; i < 8; i++) begin
      logic [4:0] o; logic [7:0] d;
      o = 5'($urandom); d = 8'($urandom);
      op(1'b1, o, d);
      check(bus_w.size() == i + 1 && bus_w[i] == d, "write data on the bus");
      check(addr_w[i] == 16'h0300 + 16'(o), "write address");
      op(1'b0, o, 8'h00);
      check(rdata == ((8'h00 + 8'(o)) ^ 8'h5A), $sformatf("read data %02h", rdata));
      check(addr_r[i] == 16'h0300 + 16'(o), "read address");
    end
    @(negedge clk);
    check(ndone == 16, "one done per request");
    foreach (wid_w[i]) check(wid_w[i] == STROBE, "write strobe width");
    foreach (wid_r[i]) check(wid_r[i] == STROBE, "read strobe width");
    check(wid_w.size() == 8 && wid_r.size() == 8, "eight strobes of each kind");
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
