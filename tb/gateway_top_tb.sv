// gateway_top_tb: end-to-end test of the whole gateway at a fast baud
// divider (16 cycles per bit) and a short packaging period, with the
// controller model on the ISA bus and a serial transmitter and receiver
// model on every port.
// Serial to Ethernet: bytes sent on several ports must come out, per port
// and in order, in the records (FF EE port length data) of the frames the
// controller reports as sent well; frames carry the gateway's MAC and type.
// Ethernet to serial: an injected IP frame's records must appear on the
// named ports' lines as FF EE followed by the data, and the done flags must
// rise. Every mechanism is made to happen and counted: packaging on a full
// block and on the timer, a send repeated after a TSR failure, a frame
// dropped after six repeats, both transmit buffers, a receive error, an
// ARP frame, a record for a missing port, a receive buffer overflow and an
// invalid stop bit on a line.
module gateway_top_tb;
  import gateway_pkg::*;
  localparam int N = 16;
  localparam int DIV = 16;
  localparam int PERIOD = 30000;
  localparam logic [47:0] MAC = 48'h0200_0000_0001;
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
  int port_div [N];
  int n_block = 0, n_timer = 0, n_ok = 0, n_retry = 0, n_fail = 0, n_rx = 0, n_err = 0;
  int n_other = 0, n_rec = 0, n_bad = 0, n_lineerr = 0;
  logic [7:0] exp_eth [N][$];
  logic [7:0] got_eth [N][$];
  logic [7:0] exp_ser [N][$];
  logic [7:0] got_ser [N][$];

  gateway_top #(.N_PORTS(N), .BAUD_DIV(DIV), .PACK_PERIOD(PERIOD), .MAC(MAC)) dut (.*);
  rtl8019_model model (.clk, .sa, .sd_in(sd_o), .sd_out(sd_i), .iorb, .iowb);

  always #5 clk = !clk;

  always @(posedge clk) if (rst_n) begin
    n_block += int'(events.pack_block);
    n_timer += int'(events.pack_timer);
    n_ok    += int'(events.tx_ok);
    n_retry += int'(events.tx_retry);
    n_fail  += int'(events.tx_fail);
    n_rx    += int'(events.rx_frame);
    n_err   += int'(events.rx_error);
    n_other += int'(events.rx_other);
    n_rec   += int'(events.rec_done);
    n_bad   += int'(events.bad_port);
    n_lineerr += $countones(rx_err);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ser_send(input int p, input logic [7:0] b, input bit stop = 1'b1);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd[p] = f[i];
      repeat (port_div[p]) @(negedge clk);
    end
    rxd[p] = 1'b1;
    repeat (port_div[p]) @(negedge clk);
  endtask

  task automatic ser_burst(input int p, input int n);
    for (int i = 0; i < n; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      exp_eth[p].push_back(b);
      ser_send(p, b);
    end
  endtask

  task automatic ser_monitor(input int p);
    forever begin
      logic [7:0] b;
      @(posedge clk);
      while (txd[p]) @(posedge clk);
      repeat (port_div[p] / 2 - 1) @(posedge clk);
      if (txd[p]) begin failures++; $display("FAIL: port %0d start bit", p); end
      for (int i = 0; i < 8; i++) begin
        repeat (port_div[p]) @(posedge clk);
        b[i] = txd[p];
      end
      repeat (port_div[p]) @(posedge clk);
      if (!txd[p]) begin failures++; $display("FAIL: port %0d stop bit", p); end
      got_ser[p].push_back(b);
    end
  endtask

  task automatic cfg_write(input int p, input logic [2:0] a, input logic [15:0] d);
    @(negedge clk); cfg_port = 4'(p); cfg_addr = a; cfg_wdata = d; cfg_we = 1'b1;
    @(negedge clk); cfg_we = 1'b0;
  endtask

  // parse every frame the controller reported as sent well
  task automatic parse_frames();
    int base;
    logic [111:0] h;
    h = {48'hFFFF_FFFF_FFFF, MAC, ETH_TYPE_IP};
    base = 0;
    for (int k = 0; k < model.tx_lens.size(); k++) begin
      int len, i;
      len = model.tx_lens[k];
      if (model.tx_good[k]) begin
        for (int j = 0; j < 14; j++)
          check(model.tx_bytes[base + j] == h[111 - 8*j -: 8], "Ethernet header byte");
        check(len >= 60, "frame padded to 60 bytes");
        i = 14;
        while (i + 4 <= len && model.tx_bytes[base + i] == 8'hFF && model.tx_bytes[base + i + 1] == 8'hEE) begin
          int p, n;
          p = int'(model.tx_bytes[base + i + 2]);
          n = int'(model.tx_bytes[base + i + 3]);
          check(p < N && n > 0, "record header");
          for (int j = 0; j < n; j++) if (p < N) got_eth[p].push_back(model.tx_bytes[base + i + 4 + j]);
          i += 4 + n;
        end
      end
      base += len;
    end
  endtask

  function automatic void add_rec(ref logic [7:0] f [$], input int p, input int n);
    f.push_back(8'hFF); f.push_back(8'hEE); f.push_back(8'(p)); f.push_back(8'(n));
    if (p < N) begin exp_ser[p].push_back(8'hFF); exp_ser[p].push_back(8'hEE); end
    for (int i = 0; i < n; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      f.push_back(b);
      if (p < N) exp_ser[p].push_back(b);
    end
  endfunction

  function automatic void eth_hdr(ref logic [7:0] f [$], input logic [15:0] t);
    logic [111:0] h;
    h = {MAC, 48'h00E0_4C11_2233, t};
    for (int i = 0; i < 14; i++) f.push_back(h[111 - 8*i -: 8]);
  endfunction

  initial begin
    logic [7:0] f [$];
    int pages_seen [2];
    for (int p = 0; p < N; p++) port_div[p] = DIV;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int p = 0; p < N; p++) fork
      automatic int q = p;
      ser_monitor(q);
    join_none
    wait (init_done);
    check(model.curr == 8'h4d && model.pstart == 8'h4c, "controller initialised");

    // 1. full blocks on ports 1 and 6 (in parallel), a short burst on port 9
    fork
      ser_burst(1, 10);
      ser_burst(6, 10);
      ser_burst(9, 3);
    join
    repeat (3000) @(negedge clk);
    check(n_block >= 1, "packaging on a full block");

    // 2. timer only: 2 bytes on port 12, nothing else
    ser_burst(12, 2);
    repeat (PERIOD + 3000) @(negedge clk);
    check(n_timer >= 1, "packaging on the timer");

    // 3. one failed send is repeated
    model.fail_next = 1;
    ser_burst(3, 10);
    wait (n_retry >= 1);
    repeat (3000) @(negedge clk);

    // 4. seven failures: the frame is dropped, its bytes are lost
    model.fail_next = 7;
    for (int i = 0; i < 10; i++) ser_send(4, 8'($urandom));
    wait (n_fail == 1);
    repeat (200) @(negedge clk);

    // 5. more blocks after the failure
    fork
      ser_burst(0, 12);
      ser_burst(15, 25);
    join
    repeat (PERIOD + 3000) @(negedge clk);

    // 6. Ethernet to serial: records for ports 2 and 14, one for port 20
    f.delete(); eth_hdr(f, ETH_TYPE_IP);
    add_rec(f, 2, 5); add_rec(f, 20, 3); add_rec(f, 14, 30);
    while (f.size() < 60) f.push_back(8'h00);
    model.inject(f, 8'h01);
    // a second frame for port 2 behind it
    f.delete(); eth_hdr(f, ETH_TYPE_IP);
    add_rec(f, 2, 4);
    while (f.size() < 60) f.push_back(8'h00);
    model.inject(f, 8'h01);
    // an error frame and an ARP frame
    f.delete(); eth_hdr(f, ETH_TYPE_IP);
    for (int i = 0; i < 46; i++) f.push_back(8'hFF);
    model.inject(f, 8'h02);
    f.delete(); eth_hdr(f, ETH_TYPE_ARP);
    for (int i = 0; i < 46; i++) f.push_back(8'hEE);
    model.inject(f, 8'h01);
    wait (got_ser[14].size() == exp_ser[14].size());
    repeat (4 * DIV * 10) @(negedge clk);
    check(send_done[2] && send_done[14], "send done flags");

    // 7. overflow: port 5 at a fast rate with a large block size, started
    //    right after a timer flush (a byte on port 11 makes one happen)
    cfg_write(5, 3'd1, 16'd200);
    cfg_write(5, 3'd0, 16'd4);
    port_div[5] = 4;
    ser_burst(11, 1);
    @(posedge events.pack_timer);
    for (int i = 0; i < 70; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (i < 64) exp_eth[5].push_back(b);
      ser_send(5, b);
    end
    check(rx_overflow[5], "receive buffer overflow flagged");
    repeat (PERIOD + 3000) @(negedge clk);

    // 8. invalid stop bit on port 8: dropped
    ser_send(8, 8'h55, 1'b0);
    repeat (20) @(negedge clk);

    // results
    parse_frames();
    for (int p = 0; p < N; p++) begin
      check(got_eth[p].size() == exp_eth[p].size(),
            $sformatf("port %0d: %0d bytes reached Ethernet, want %0d", p, got_eth[p].size(), exp_eth[p].size()));
      for (int i = 0; i < exp_eth[p].size() && i < got_eth[p].size(); i++)
        check(got_eth[p][i] == exp_eth[p][i], $sformatf("port %0d byte %0d to Ethernet", p, i));
      check(got_ser[p].size() == exp_ser[p].size(),
            $sformatf("port %0d: %0d bytes on the line, want %0d", p, got_ser[p].size(), exp_ser[p].size()));
      for (int i = 0; i < exp_ser[p].size() && i < got_ser[p].size(); i++)
        check(got_ser[p][i] == exp_ser[p][i], $sformatf("port %0d byte %0d to the line", p, i));
    end
    pages_seen = '{0, 0};
    foreach (model.tx_pages[k]) begin
      if (model.tx_pages[k] == 8'h45) pages_seen[0]++;
      if (model.tx_pages[k] == 8'h40) pages_seen[1]++;
    end
    check(model.proto_err == 0, "controller bus protocol kept");
    $display("events: block %0d timer %0d ok %0d retry %0d fail %0d rx %0d err %0d other %0d rec %0d bad %0d lineerr %0d pages %0d/%0d",
             n_block, n_timer, n_ok, n_retry, n_fail, n_rx, n_err, n_other, n_rec, n_bad, n_lineerr,
             pages_seen[0], pages_seen[1]);
    check(n_block > 0, "mechanism: package on full block");
    check(n_timer > 0, "mechanism: package on 100 ms timer");
    check(n_retry > 0, "mechanism: send repeated after TSR failure");
    check(n_fail == 1, "mechanism: frame dropped after six repeats");
    check(n_retry == 1 + 6, "six repeats before dropping");
    check(pages_seen[0] > 0 && pages_seen[1] > 0, "mechanism: both transmit buffers used");
    check(n_rx == 2, "mechanism: IP frames unpacked");
    check(n_err == 1, "mechanism: receive error");
    check(n_other == 1, "mechanism: ARP frame released");
    check(n_rec == 4, "mechanism: records handled (three delivered, one dropped)");
    check(n_bad == 1, "mechanism: record for a missing port");
    check(rx_overflow[5] && $countones(rx_overflow) == 1, "mechanism: receive overflow");
    // the low stop bit is reported, and the line still being low right after
    // it is then seen as a start bit that turns out invalid
    check(n_lineerr == 2, "mechanism: invalid stop bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (block %0d timer %0d ok %0d retry %0d fail %0d rx %0d)",
             n_block, n_timer, n_ok, n_retry, n_fail, n_rx);
    $display("rec %0d bad %0d err %0d other %0d", n_rec, n_bad, n_err, n_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
