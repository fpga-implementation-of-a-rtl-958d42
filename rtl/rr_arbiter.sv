// rr_arbiter: round-robin choice of one input queue per cycle.
//
// req[i] is high when queue i holds a packet. Starting at the pointer, the
// first requesting queue is selected (sel, valid). Every cycle in which some
// queue is selected the pointer moves to the queue after the selected one,
// whether or not the router could forward that packet: a packet held back by
// a full downstream queue does not keep the other queues waiting. The choice is
// combinational; the pointer is a register reset to queue 0.
//
// Round-robin service of the input queues is as described for the router; the
// rule that the pointer advances also past a blocked queue is this design's.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  output logic                 valid,
  output logic [$clog2(N)-1:0] sel
);
  localparam int unsigned W = $clog2(N);

  logic [W-1:0] ptr;

  always_comb begin
    logic [W-1:0] idx;
    valid = 1'b0;
    sel   = ptr;
    for (int unsigned k = 0; k < N; k++) begin
      idx = W'((int'(ptr) + k) % N);
      if (!valid && req[idx]) begin
        valid = 1'b1;
        sel   = idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ptr <= '0;
    else if (valid) ptr <= (sel == W'(N - 1)) ? '0 : sel + 1'b1;
  end

  a_sel_requests: assert property (@(posedge clk) disable iff (!rst_n) valid |-> req[sel])
    else $error("rr_arbiter: selected queue is not requesting");

endmodule
