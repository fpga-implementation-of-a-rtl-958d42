// rr_arbiter_tb: self-checking test of the round-robin input selection.
//
// A reference pointer kept in the testbench predicts the selected queue for
// random request patterns: the first requester at or after the pointer, the
// pointer then moving just past it. Also checks that every one of four always
// requesting queues is served exactly once in four cycles.
module rr_arbiter_tb;
  localparam int N = 4;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] req;
  logic         valid;
  logic [1:0]   sel;
  int           checks = 0, failures = 0;
  int           ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: req=%b sel=%0d ptr=%0d", what, $time, req, sel, ptr);
    end
  endtask

  task automatic step(input logic [N-1:0] r);
    int exp;
    req = r;
    #1;
    exp = -1;
    for (int k = N - 1; k >= 0; k--)
      if (r[(ptr + k) % N]) exp = (ptr + k) % N;
    check(valid == (r != 0), "valid");
    if (r != 0) begin
      check(int'(sel) == exp, "selected queue");
      ptr = (exp + 1) % N;
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    int seen [N];
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    foreach (seen[i]) seen[i] = 0;
    for (int c = 0; c < N; c++) begin
      req = '1;
      #1;
      seen[sel]++;
      step('1);
    end
    foreach (seen[i]) check(seen[i] == 1, "each queue once in four cycles");
    for (int i = 0; i < 3000; i++) step(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
