// gateway_full_tb: one complete operation of the gateway with every
// parameter at its default: 16 ports, 19.2 MHz clock, divider 1000
// (19200 bit/s), blocks of 10 characters, 100 ms packaging period.
// Port 5 receives ten characters, which must leave at once as one frame
// holding FF EE 05 0A and the data; port 0 receives two characters, which
// must leave with the next 100 ms packaging; an Ethernet frame with a
// record for port 12 must come out of port 12's line as FF EE and the
// data, each character taking 10 bit times of 1000 cycles.
module gateway_full_tb;
  import gateway_pkg::*;
  localparam int N = 16;
  localparam int DIV = 1000;
  localparam int PERIOD = 1_920_000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] rxd = '1, txd;
  logic [15:0] sa;
  logic [7:0] sd_o, sd_i;
  logic sd_oe, iorb, iowb;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_port = '0;
  logic [2:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0, cfg_rdata;
  logic init_done, txd_buffer_select;
  logic [N-1:0] send_done, rx_overflow, rx_err;
  gw_events_t events;
  int checks = 0, failures = 0;
  int n_block = 0, n_timer = 0;
  longint cyc = 0;
  logic [7:0] got12 [$];
  longint start12 [$];

  gateway_top dut (.*);
  rtl8019_model model (.clk, .sa, .sd_in(sd_o), .sd_out(sd_i), .iorb, .iowb);

  always #26 clk = !clk;   // about 19.2 MHz

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_block += int'(events.pack_block);
      n_timer += int'(events.pack_timer);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ser_send(input int p, input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd[p] = f[i];
      repeat (DIV) @(negedge clk);
    end
  endtask

  // check the last frame sent: header, then records {port, data}
  task automatic check_frame(input int p, input logic [7:0] data [$]);
    int base, len;
    logic [111:0] h;
    h = {48'hFFFF_FFFF_FFFF, 48'h0200_0000_0001, ETH_TYPE_IP};
    len  = model.tx_lens[$];
    base = model.tx_bytes.size() - len;
    check(len == ((18 + data.size() < 60) ? 60 : 18 + data.size()), $sformatf("frame length %0d", len));
    for (int j = 0; j < 14; j++) check(model.tx_bytes[base + j] == h[111 - 8*j -: 8], "header byte");
    check(model.tx_bytes[base + 14] == 8'hFF && model.tx_bytes[base + 15] == 8'hEE, "sync heads");
    check(model.tx_bytes[base + 16] == 8'(p), "port number");
    check(model.tx_bytes[base + 17] == 8'(data.size()), "record length");
    foreach (data[j]) check(model.tx_bytes[base + 18 + j] == data[j], $sformatf("data byte %0d", j));
  endtask

  initial begin
    forever begin
      logic [7:0] b;
      @(posedge clk);
      if (rst_n && !txd[12]) begin
        start12.push_back(cyc);
        repeat (DIV / 2 - 1) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (DIV) @(posedge clk);
          b[i] = txd[12];
        end
        repeat (DIV) @(posedge clk);
        checks++;
        if (!txd[12]) begin failures++; $display("FAIL: stop bit"); end
        got12.push_back(b);
      end
    end
  end

  initial begin
    logic [7:0] d5 [$];
    logic [7:0] d0 [$];
    logic [7:0] f [$];
    logic [7:0] d12 [$];
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (init_done);
    // ten characters on port 5
    for (int i = 0; i < 10; i++) begin d5.push_back(8'($urandom)); ser_send(5, d5[i]); end
    t0 = cyc;
    wait (model.tx_lens.size() == 1);
    check(cyc - t0 < 20 * DIV, $sformatf("block sent %0d cycles after the 10th character", cyc - t0));
    check(n_block == 1, "sent because of the full block");
    check_frame(5, d5);
    // two characters on port 0: wait for the 100 ms packaging
    for (int i = 0; i < 2; i++) begin d0.push_back(8'($urandom)); ser_send(0, d0[i]); end
    t0 = cyc;
    wait (model.tx_lens.size() == 2);
    check(cyc - t0 <= PERIOD + 10000, $sformatf("flushed %0d cycles after the data", cyc - t0));
    check(n_timer == 1, "sent because of the 100 ms timer");
    check_frame(0, d0);
    // Ethernet to port 12
    begin
      logic [111:0] h;
      h = {48'h0200_0000_0001, 48'h00E0_4C11_2233, ETH_TYPE_IP};
      for (int i = 0; i < 14; i++) f.push_back(h[111 - 8*i -: 8]);
    end
    f.push_back(8'hFF); f.push_back(8'hEE); f.push_back(8'd12); f.push_back(8'd4);
    d12 = '{8'hFF, 8'hEE};
    for (int i = 0; i < 4; i++) begin logic [7:0] b; b = 8'($urandom); f.push_back(b); d12.push_back(b); end
    while (f.size() < 60) f.push_back(8'h00);
    model.inject(f, 8'h01);
    wait (got12.size() == 6);
    repeat (DIV) @(negedge clk);
    foreach (d12[i]) check(got12[i] == d12[i], $sformatf("port 12 byte %0d", i));
    for (int i = 1; i < 6; i++) check(start12[i] - start12[i-1] == 10 * DIV, "10 bit times per character");
    check(send_done[12], "port 12 send done");
    check(model.proto_err == 0, "controller bus protocol kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
