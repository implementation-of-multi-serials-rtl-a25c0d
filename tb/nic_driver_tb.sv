// nic_driver_tb: the driver against the controller model. Checks the
// initialisation (PSTART 0x4c, PSTOP 0x80, BNRY 0x4c, TPSR 0x45, RCR 0xcc,
// TCR 0xe0, DCR 0xc8, IMR 0x00, CURR 0x4d, station address, started in
// page 0); a frame sent from the frame buffer arrives intact; the transmit
// buffer alternates between pages 0x45 and 0x40; a TSR failure repeats the
// send and seven failures drop the frame after six repeats; a received IP
// frame's payload is streamed out exactly (under random backpressure) and
// BNRY then frees the ring; frames with a bad RSR and ARP frames are
// released without payload; an empty ring is left alone.
module nic_driver_tb;
  import gateway_pkg::*;
  localparam logic [47:0] MAC = 48'h0200_0000_00AB;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_valid = 1'b0, frame_done;
  logic [10:0] frame_len = '0, fb_raddr;
  logic [7:0] fb_rdata;
  logic pl_start, pl_valid, pl_ready;
  logic [7:0] pl_data;
  logic [15:0] sa;
  logic [7:0] sd_o, sd_i;
  logic sd_oe, iorb, iowb;
  logic init_done, tx_ok, tx_retry, tx_fail, rx_frame, rx_error, rx_other, txd_buffer_select;
  int checks = 0, failures = 0;
  logic [7:0] fb [2048];
  logic [7:0] pl_got [$];
  int n_ok = 0, n_retry = 0, n_fail = 0, n_rx = 0, n_err = 0, n_other = 0, n_start = 0;

  nic_driver #(.MAC(MAC)) dut (.*);
  rtl8019_model model (.clk, .sa, .sd_in(sd_o), .sd_out(sd_i), .iorb, .iowb);

  always #5 clk = !clk;
  assign fb_rdata = fb[fb_raddr];
  always @(negedge clk) pl_ready <= ($urandom % 3 != 0);

  always @(posedge clk) if (rst_n) begin
    if (pl_valid && pl_ready) pl_got.push_back(pl_data);
    if (pl_start) n_start++;
    if (tx_ok) n_ok++;
    if (tx_retry) n_retry++;
    if (tx_fail) n_fail++;
    if (rx_frame) n_rx++;
    if (rx_error) n_err++;
    if (rx_other) n_other++;
    if (frame_done) frame_valid <= 1'b0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_frame(input int len, input int fails, input int exp_page);
    int base, tx0;
    tx0 = model.tx_bytes.size();
    for (int i = 0; i < len; i++) fb[i] = 8'($urandom);
    model.fail_next = fails;
    @(negedge clk); frame_len = 11'(len); frame_valid = 1'b1;
    wait (!frame_valid);
    @(negedge clk);
    base = model.tx_bytes.size() - len;
    check(model.tx_lens[$] == len, $sformatf("sent length %0d want %0d", model.tx_lens[$], len));
    check(model.tx_pages[$] == exp_page, $sformatf("transmit page %02h want %02h", model.tx_pages[$], exp_page));
    for (int i = 0; i < len; i++)
      check(model.tx_bytes[base + i] == fb[i], $sformatf("sent byte %0d", i));
    check(model.tx_bytes.size() - tx0 == len * ((fails > 6 ? 6 : fails) + 1), "one transmit per attempt");
  endtask

  initial begin
    logic [7:0] f [$];
    logic [7:0] exp [$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (init_done);
    repeat (5) @(negedge clk);
    check(model.pstart == 8'h4c && model.pstop == 8'h80, "PSTART/PSTOP");
    check(model.tpsr == 8'h45, "TPSR");
    check(model.rcr == 8'hcc && model.tcr == 8'he0 && model.dcr == 8'hc8 && model.imr == 8'h00,
          "RCR/TCR/DCR/IMR");
    check(model.curr == 8'h4d, "CURR");
    check(model.par[0] == 8'h02 && model.par[5] == 8'hAB, "station address");
    check(model.cr[7:6] == 2'd0 && model.cr[1], "started on page 0");
    repeat (500) @(negedge clk);
    check(n_start == 0 && model.bnry == 8'h4c, "empty ring left alone");
    // sends
    send_frame(60, 0, 8'h45);
    check(n_ok == 1 && txd_buffer_select, "good send toggles the buffer select");
    send_frame(100, 2, 8'h40);
    check(n_retry == 2 && n_ok == 2, "two failures repeated");
    send_frame(64, 7, 8'h45);
    check(n_fail == 1 && n_retry == 8, $sformatf("dropped after 6 repeats (retries %0d)", n_retry));
    check(model.proto_err == 0, "remote DMA protocol kept");
    // receive an IP frame: 14 header bytes + 300 payload bytes (crosses a page)
    f.delete(); exp.delete();
    for (int i = 0; i < 12; i++) f.push_back(8'($urandom));
    f.push_back(8'h08); f.push_back(8'h00);
    for (int i = 0; i < 300; i++) begin logic [7:0] b; b = 8'($urandom); f.push_back(b); exp.push_back(b); end
    pl_got.delete();
    model.inject(f, 8'h01);
    wait (n_rx == 1);
    wait (model.bnry == model.curr - 8'd1);
    repeat (10) @(negedge clk);
    check(pl_got.size() == exp.size(), $sformatf("payload %0d bytes want %0d", pl_got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < pl_got.size(); i++) check(pl_got[i] == exp[i], "payload byte");
    check(n_start == 1, "one payload start");
    // bad RSR
    f[12] = 8'h08; f[13] = 8'h00;
    model.inject(f, 8'h00);
    wait (n_err == 1);
    wait (model.bnry == model.curr - 8'd1);
    // ARP
    f[13] = 8'h06;
    model.inject(f, 8'h01);
    wait (n_other == 1);
    wait (model.bnry == model.curr - 8'd1);
    repeat (20) @(negedge clk);
    check(n_start == 1, "no payload from an error or ARP frame");
    // ring wrap: many small frames
    for (int k = 0; k < 60; k++) begin
      f.delete();
      for (int i = 0; i < 12; i++) f.push_back(8'h00);
      f.push_back(8'h08); f.push_back(8'h00);
      for (int i = 0; i < 46; i++) f.push_back(8'(k));
      model.inject(f, 8'h01);
      wait (model.bnry == ((model.curr == 8'h4c) ? 8'h7f : model.curr - 8'd1));
    end
    check(n_rx == 61, $sformatf("61 IP frames received (%0d)", n_rx));
    check(model.proto_err == 0, "remote DMA protocol kept on receive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
