// frame_packer_tb: four port buffers are modelled as queues. Checks that a
// full block on one port starts a frame at once (pack_block) and that the
// frame holds the Ethernet header, then FF EE port length and the port's
// bytes, padded to 60 bytes; that data below a block waits for the period
// timer (pack_timer) and then all ports holding data are packed in port
// order; that the buffers are drained and block_clr is given; and that no
// frame is started while the timer expires with nothing to send.
module frame_packer_tb;
  import gateway_pkg::*;
  localparam int N = 4;
  localparam int PERIOD = 3000;
  localparam logic [47:0] DST = 48'h0011_2233_4455;
  localparam logic [47:0] SRC = 48'h0200_0000_0001;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][6:0] rx_count;
  logic [N-1:0][7:0] rx_dout;
  logic [N-1:0] block_ready = '0, rx_pop, block_clr;
  logic [10:0] fb_raddr = '0, frame_len;
  logic [7:0] fb_rdata;
  logic frame_valid, frame_done = 1'b0, pack_block, pack_timer;
  int checks = 0, failures = 0;
  int nblock = 0, ntimer = 0;
  logic [7:0] q [N][$];
  longint cyc = 0;

  frame_packer #(.N_PORTS(N), .AW(6), .PACK_PERIOD(PERIOD), .DST_MAC(DST),
                 .SRC_MAC(SRC)) dut (.*);

  always #5 clk = !clk;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      rx_count[i] = 7'(q[i].size());
      rx_dout[i]  = (q[i].size() > 0) ? q[i][0] : 8'h00;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (rx_pop[i] && q[i].size() > 0) void'(q[i].pop_front());
        if (block_clr[i]) block_ready[i] <= 1'b0;
      end
      if (pack_block) nblock++;
      if (pack_timer) ntimer++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // read the frame buffer and compare with the expected frame
  task automatic check_frame(input logic [7:0] exp [$]);
    int len;
    len = exp.size() < 60 ? 60 : exp.size();
    check(32'(frame_len) == len, $sformatf("frame length %0d want %0d", frame_len, len));
    for (int i = 0; i < len; i++) begin
      fb_raddr = 11'(i); #1;
      check(fb_rdata == ((i < exp.size()) ? exp[i] : 8'h00),
            $sformatf("frame byte %0d: %02h want %02h", i, fb_rdata,
                      (i < exp.size()) ? exp[i] : 8'h00));
    end
    @(negedge clk); frame_done = 1'b1; @(negedge clk); frame_done = 1'b0;
    @(negedge clk);
    check(!frame_valid, "frame released");
  endtask

  function automatic void add_hdr(ref logic [7:0] e [$]);
    logic [111:0] h;
    h = {DST, SRC, ETH_TYPE_IP};
    for (int i = 0; i < 14; i++) e.push_back(h[111 - 8*i -: 8]);
  endfunction

  initial begin
    logic [7:0] e [$];
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // let the timer expire once with nothing to send
    repeat (PERIOD + 10) @(negedge clk);
    check(!frame_valid && ntimer == 0, "no frame for an empty timer period");
    // block on port 2: 10 bytes
    e.delete(); add_hdr(e);
    e.push_back(SYNC_HEAD0); e.push_back(SYNC_HEAD1); e.push_back(8'd2); e.push_back(8'd10);
    for (int i = 0; i < 10; i++) begin
      logic [7:0] b; b = 8'($urandom); q[2].push_back(b); e.push_back(b);
    end
    t0 = cyc;
    block_ready[2] = 1'b1;
    wait (frame_valid);
    check(cyc - t0 < 100, $sformatf("block frame ready %0d cycles after the block", cyc - t0));
    check(nblock == 1 && ntimer == 0, "frame started by the block");
    check(q[2].size() == 0, "port 2 drained");
    check(!block_ready[2], "block cleared");
    check_frame(e);
    // below-block data on ports 0, 1 and 3: wait for the timer
    e.delete(); add_hdr(e);
    for (int p = 0; p < N; p++) begin
      int n;
      if (p == 2) continue;
      n = (p == 1) ? 40 : p + 2;
      e.push_back(SYNC_HEAD0); e.push_back(SYNC_HEAD1); e.push_back(8'(p)); e.push_back(8'(n));
      for (int i = 0; i < n; i++) begin
        logic [7:0] b; b = 8'($urandom); q[p].push_back(b); e.push_back(b);
      end
    end
    t0 = cyc;
    repeat (20) @(negedge clk);
    check(!frame_valid, "no frame before the timer");
    wait (frame_valid);
    check(cyc - t0 <= PERIOD + 200, "timer frame within one period");
    check(ntimer == 1, "frame started by the timer");
    check(q[0].size() == 0 && q[1].size() == 0 && q[3].size() == 0, "all ports drained");
    check_frame(e);
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
