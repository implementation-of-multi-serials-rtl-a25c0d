// io_buffer_tb: random pushes and pops against a queue model. Checks the
// head byte, count, empty and full every cycle, that a push into a full
// buffer and a pop from an empty one are ignored, and simultaneous
// push and pop.
module io_buffer_tb;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [7:0] din = '0, dout;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [7:0] model [$];
  int nfull = 0, nempty_pop = 0, nboth = 0;

  io_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      int mode;
      mode = (i / 200) % 3;   // phases: fill, drain, mixed
      push = (mode == 0) ? ($urandom % 4 != 0) : (mode == 1) ? ($urandom % 4 == 0) : $urandom % 2;
      pop  = (mode == 1) ? ($urandom % 4 != 0) : (mode == 0) ? ($urandom % 4 == 0) : $urandom % 2;
      din  = 8'($urandom);
      #1;
      check(count == 4'(model.size()), $sformatf("count %0d want %0d", count, model.size()));
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(dout == model[0], "head byte");
      @(posedge clk);
      if (push && pop && model.size() > 0 && model.size() < DEPTH) nboth++;
      if (push && model.size() == DEPTH && !(pop)) nfull++;
      if (pop && model.size() == 0) nempty_pop++;
      begin
        logic do_pop, do_push;
        do_pop  = pop && model.size() > 0;
        do_push = push && model.size() < DEPTH;
        if (do_pop) void'(model.pop_front());
        if (do_push) model.push_back(din);
      end
      @(negedge clk);
    end
    check(nfull > 0, "push into a full buffer exercised");
    check(nempty_pop > 0, "pop from an empty buffer exercised");
    check(nboth > 0, "simultaneous push and pop exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
