// noc_fifo: input queue of one router port.
//
// Stores up to DEPTH packets (eight in this design) in a small register array
// with 3-bit read and write pointers and an occupancy counter. A packet is
// written whenever in_valid is high and the queue is not full (in_ready is
// simply "not full"), and it appears at the head (dout, empty low) on the next
// clock edge. The head is read combinationally; pop removes it. Writing and
// popping in the same cycle is allowed, also when full (the write is then
// refused, as in_ready is low) or empty (nothing to pop).
//
// The queue size follows the router description; the valid/ready handshake
// that refuses writes when full is this design's choice, since the source
// does not say what happens to a packet arriving at a full queue.
module noc_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic             empty,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             full, do_wr, do_rd;

  assign full     = (count == (AW+1)'(DEPTH));
  assign empty    = (count == '0);
  assign in_ready = !full;
  assign do_wr    = in_valid && !full;
  assign do_rd    = pop && !empty;
  assign dout     = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  // The router pops only a queue it has selected, which is never empty.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("noc_fifo: pop while empty");

endmodule
