// noc_router: four-port, table-routed router of the application-specific NoC.
//
// Each input port has an eight-packet FIFO; a port that no path table ever
// sends traffic into has no FIFO at all (FIFO_USED), and its in_ready stays
// low. A round-robin arbiter picks one non-empty FIFO per cycle and a
// multiplexer brings its head packet to the routing LUT, which turns the packet
// ID and the selected path table (pt_sel) into an output port. The routing
// logic raises out_valid on that one port only; all ports carry the same
// out_pkt, like a shared bus behind per-port enables. If the chosen port's
// out_ready is high the packet leaves and is popped in the same cycle (fwd
// pulses); otherwise it stays and the arbiter tries the next FIFO next cycle.
//
// Timing: a packet written into a FIFO at one clock edge is offered at the
// output during the following cycle, so an idle router adds one cycle per hop.
// Throughput is at most one packet per cycle per router (a single MUX).
//
// NPORTS sets the number of ports (four throughout this network, whose
// topology needs no other size); LUT and FIFO_USED must then be given to
// match, since the defaults are derived for the four-port routers r1..r8.
//
// FIFOs, round-robin MUX, LUT and port enabling follow the router description.
// The valid/ready flow control between routers replaces the source's
// tristate output buffers and is this design's choice, as is port numbering.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned       NPORTS    = NUM_PORTS,
  parameter int unsigned       ROUTER_ID = 1,
  parameter logic [NUM_PT-1:0][NUM_EDGES-1:0][$clog2(NPORTS)-1:0] LUT = router_lut(ROUTER_ID),
  parameter logic [NPORTS-1:0] FIFO_USED = router_fifo_used(ROUTER_ID)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  pt_sel_t              pt_sel,
  input  logic    [NPORTS-1:0] in_valid,
  input  packet_t [NPORTS-1:0] in_pkt,
  output logic    [NPORTS-1:0] in_ready,
  output logic    [NPORTS-1:0] out_valid,
  output packet_t              out_pkt,
  input  logic    [NPORTS-1:0] out_ready,
  output logic                 fwd
);
  localparam int unsigned PW = $clog2(NPORTS);

  logic    [NPORTS-1:0] empty, pop;
  packet_t [NPORTS-1:0] head;
  logic                 any;
  logic    [PW-1:0]     sel, out_port;
  logic                 hit, port_ok;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    if (FIFO_USED[p]) begin : g_fifo
      noc_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_valid (in_valid[p]),
        .in_ready (in_ready[p]),
        .din      (in_pkt[p]),
        .pop      (pop[p]),
        .empty    (empty[p]),
        .dout     (head[p])
      );
    end else begin : g_none
      assign in_ready[p] = 1'b0;
      assign empty[p]    = 1'b1;
      assign head[p]     = '0;
      a_unused_idle: assert property (@(posedge clk) disable iff (!rst_n) !in_valid[p])
        else $error("noc_router %0d: packet on port %0d, which has no FIFO", ROUTER_ID, p);
    end
  end

  rr_arbiter #(.N(NPORTS)) u_arb (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (~empty),
    .valid (any),
    .sel   (sel)
  );

  assign out_pkt = head[sel];

  route_lut #(.NPORTS(NPORTS), .LUT(LUT)) u_lut (
    .pt_sel (pt_sel),
    .id     (out_pkt.id),
    .port   (out_port),
    .hit    (hit)
  );

  assign port_ok = (int'(out_port) < NPORTS);

  always_comb begin
    out_valid = '0;
    pop       = '0;
    fwd       = 1'b0;
    if (any && port_ok) begin
      out_valid[out_port] = 1'b1;
      fwd = out_ready[out_port];
    end
    if (fwd) pop[sel] = 1'b1;
  end

  a_known_id: assert property (@(posedge clk) disable iff (!rst_n) any |-> hit && port_ok)
    else $error("noc_router %0d: packet ID %0d has no route", ROUTER_ID, out_pkt.id);

endmodule
