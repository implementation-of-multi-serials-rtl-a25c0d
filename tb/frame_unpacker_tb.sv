// frame_unpacker_tb: feeds a payload of records (for ports 1 and 3, one
// for a port that does not exist, one of length 0, then zero padding) with
// random gaps, while the port transmit buffers randomly report full. Checks
// that each port receives FF EE and its data bytes in order, gets one send
// command with length n + 2 per record, that the record for the missing
// port is dropped and flagged, that nothing is written while a buffer is
// full, and that the padding writes nothing.
module frame_unpacker_tb;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, in_valid = 1'b0, in_ready;
  logic [7:0] in_data = '0, tx_data;
  logic [N-1:0] tx_full = '0, tx_push, send_cmd;
  logic [8:0] send_len;
  logic rec_done, bad_port;
  int checks = 0, failures = 0;
  logic [7:0] got [N][$];
  int lens [N][$];
  int nrec = 0, nbad = 0, push_full = 0, nstall = 0;

  frame_unpacker #(.N_PORTS(N), .LEN_W(9)) dut (.*);

  always #5 clk = !clk;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (tx_push[i]) begin
          if (tx_full[i]) push_full++;
          got[i].push_back(tx_data);
        end
        if (send_cmd[i]) lens[i].push_back(int'(send_len));
      end
      if (rec_done) nrec++;
      if (bad_port) nbad++;
      if (in_valid && !in_ready) nstall++;
    end
  end

  always @(negedge clk) tx_full <= N'($urandom) & N'($urandom);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic feed(input logic [7:0] b);
    while ($urandom % 3 == 0) @(negedge clk);
    in_data = b; in_valid = 1'b1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 1'b0;
  endtask

  initial begin
    logic [7:0] pl [$];
    logic [7:0] e1 [$];
    logic [7:0] e3 [$];
    e1 = '{8'hFF, 8'hEE}; e3 = '{8'hFF, 8'hEE};
    pl = '{8'hFF, 8'hEE, 8'd1, 8'd5};
    for (int i = 0; i < 5; i++) begin logic [7:0] b; b = 8'($urandom); pl.push_back(b); e1.push_back(b); end
    pl.push_back(8'hFF); pl.push_back(8'hEE); pl.push_back(8'd9); pl.push_back(8'd3);
    pl.push_back(8'h11); pl.push_back(8'h22); pl.push_back(8'h33);
    pl.push_back(8'hFF); pl.push_back(8'hEE); pl.push_back(8'd3); pl.push_back(8'd0);
    pl.push_back(8'hFF); pl.push_back(8'hEE); pl.push_back(8'd3); pl.push_back(8'd20);
    for (int i = 0; i < 20; i++) begin logic [7:0] b; b = 8'($urandom); pl.push_back(b); e3.push_back(b); end
    for (int i = 0; i < 12; i++) pl.push_back(8'h00);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // bytes before start are ignored
    feed(8'hFF); feed(8'hEE); feed(8'd0); feed(8'd2); feed(8'h55); feed(8'h66);
    check(got[0].size() == 0, "nothing written before start");
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    foreach (pl[i]) feed(pl[i]);
    repeat (5) @(negedge clk);
    check(got[1].size() == e1.size(), $sformatf("port 1 got %0d bytes want %0d", got[1].size(), e1.size()));
    for (int i = 0; i < e1.size() && i < got[1].size(); i++) check(got[1][i] == e1[i], "port 1 byte");
    check(got[3].size() == e3.size(), $sformatf("port 3 got %0d bytes want %0d", got[3].size(), e3.size()));
    for (int i = 0; i < e3.size() && i < got[3].size(); i++) check(got[3][i] == e3[i], "port 3 byte");
    check(got[0].size() == 0 && got[2].size() == 0, "other ports untouched");
    check(lens[1].size() == 1 && lens[1][0] == 7, "port 1 send command length 7");
    check(lens[3].size() == 1 && lens[3][0] == 22, "port 3 send command length 22");
    check(nrec == 3, $sformatf("three records with data (%0d)", nrec));
    check(nbad == 1, "missing port flagged");
    check(push_full == 0, "no write into a full buffer");
    check(nstall > 0, "backpressure exercised");
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
