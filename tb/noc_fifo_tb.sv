// noc_fifo_tb: self-checking test of the eight-packet router input queue.
//
// Drives random writes and pops against a reference queue kept in the
// testbench, checks the head, empty and in_ready flags every cycle, fills the
// queue to check that the ninth packet is refused, drains it to check the
// order, and counts how often full, empty and simultaneous write+pop occurred.
module noc_fifo_tb;
  localparam int W = 32;
  localparam int D = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         in_valid, in_ready, pop, empty;
  logic [W-1:0] din, dout;
  int           checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int           n_full = 0, n_both = 0;

  noc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Compare flags and head with the model, then apply one cycle of traffic.
  task automatic step(input bit wr, input bit rd, input logic [W-1:0] d);
    check(empty == (model.size() == 0), "empty flag");
    check(in_ready == (model.size() < D), "in_ready flag");
    if (model.size() > 0) check(dout == model[0], "head data");
    in_valid = wr;
    din      = d;
    pop      = rd && (model.size() > 0);
    @(posedge clk);
    if (pop) void'(model.pop_front());
    if (wr && in_ready) model.push_back(d);
    if (wr && !in_ready) n_full++;
    if (wr && pop && in_ready) n_both++;
    #1;
  endtask

  initial begin
    in_valid = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    // fill past full: the ninth write must be refused
    for (int i = 0; i < D + 2; i++) step(1'b1, 1'b0, 32'hA000_0000 + i);
    check(model.size() == D, "holds exactly eight");
    // drain in order
    for (int i = 0; i < D + 1; i++) step(1'b0, 1'b1, '0);
    check(empty, "empty after drain");
    // random traffic
    for (int i = 0; i < 2000; i++) step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 2) == 0 ? 0 : 1) & 1'($urandom_range(0,1)), $urandom);
    for (int i = 0; i < 2000; i++) step(1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 3) == 0), $urandom);
    check(n_full > 0, "full condition seen");
    check(n_both > 0, "simultaneous write and pop seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
