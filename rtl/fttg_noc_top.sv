// fttg_noc_top: the fault-tolerant application-specific NoC for the Mp3 encoder.
//
// Eight four-port routers (noc_router) are wired into the FTTG topology: nine
// bidirectional links l1,2 l1,3 l2,4 l2,5 l3,6 l3,7 l4,8 l5,6 l7,8, which place
// every router on a cycle so that every pair of routers has two routes that
// share no link.
// The thirteen application nodes are not part of the design; each has a
// transmit port into its router (node_tx_*) and a receive port out of it
// (node_rx_*), indexed 0..12 for nodes 1..13. Which router and port a node sits
// on, and which router ports form each link, come from noc_pkg.
//
// Fault tolerance: pt_sel, an external pin input, selects the routing table
// used by every router. 0 is the default shortest-path routing; 1..4 each avoid
// two links (1: l3,6 l4,8; 2: l2,4 l2,5; 3: l1,2 l5,6; 4: l1,3 l3,7), so some
// table survives any single link failure (l7,8 is unused by the default table).
// pt_sel is meant to be changed only while the network is empty.
//
// For emulation, link_fault[l] breaks link l in both directions: the receiving
// router sees nothing and the sending router sees the link as ready, so packets
// sent onto it are lost, as on a broken wire. link_busy[l] = {b->a, a->b}
// pulses when a packet crosses link l, and router_fwd[r] when router r+1
// forwards a packet (the per-router packet counts behind the energy figures).
//
// Timing: in an idle network a packet offered at a node port is taken at the
// next clock edge and reaches the destination node's rx port that many cycles
// later, one cycle per router on its path.
//
// Topology, node placement and routing tables follow the published design;
// the link fault inputs and activity outputs are this design's additions for
// emulation and test.
module fttg_noc_top
  import noc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  pt_sel_t                 pt_sel,
  input  logic    [NUM_LINKS-1:0] link_fault,
  input  logic    [NUM_NODES-1:0] node_tx_valid,
  input  packet_t [NUM_NODES-1:0] node_tx_pkt,
  output logic    [NUM_NODES-1:0] node_tx_ready,
  output logic    [NUM_NODES-1:0] node_rx_valid,
  output packet_t [NUM_NODES-1:0] node_rx_pkt,
  input  logic    [NUM_NODES-1:0] node_rx_ready,
  output logic    [NUM_LINKS-1:0][1:0] link_busy,
  output logic    [NUM_ROUTERS-1:0]    router_fwd
);
  logic    [NUM_ROUTERS-1:0][NUM_PORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  packet_t [NUM_ROUTERS-1:0][NUM_PORTS-1:0] in_pkt;
  packet_t [NUM_ROUTERS-1:0]                out_pkt;

  for (genvar r = 0; r < NUM_ROUTERS; r++) begin : g_rt
    noc_router #(.ROUTER_ID(r + 1)) u_router (
      .clk       (clk),
      .rst_n     (rst_n),
      .pt_sel    (pt_sel),
      .in_valid  (in_valid[r]),
      .in_pkt    (in_pkt[r]),
      .in_ready  (in_ready[r]),
      .out_valid (out_valid[r]),
      .out_pkt   (out_pkt[r]),
      .out_ready (out_ready[r]),
      .fwd       (router_fwd[r])
    );

    // Wiring of each router port to its peer: another router, a node, or nothing.
    for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
      localparam int PEER = peer_of(r + 1, p);
      if (PEER >= 1 && PEER <= NUM_ROUTERS) begin : g_link
        localparam int PP = port_to(PEER, r + 1);      // port of the peer facing us
        localparam int L  = link_index(r + 1, PEER);
        assign in_valid[r][p]  = out_valid[PEER-1][PP] && !link_fault[L];
        assign in_pkt[r][p]    = out_pkt[PEER-1];
        assign out_ready[r][p] = in_ready[PEER-1][PP] || link_fault[L];
      end else if (PEER > NODE) begin : g_node
        localparam int N = PEER - NODE - 1;
        assign in_valid[r][p]   = node_tx_valid[N];
        assign in_pkt[r][p]     = node_tx_pkt[N];
        assign node_tx_ready[N] = in_ready[r][p];
        assign node_rx_valid[N] = out_valid[r][p];
        assign node_rx_pkt[N]   = out_pkt[r];
        assign out_ready[r][p]  = node_rx_ready[N];
      end else begin : g_open
        assign in_valid[r][p]  = 1'b0;
        assign in_pkt[r][p]    = '0;
        assign out_ready[r][p] = 1'b1;
      end
    end
  end

  for (genvar l = 0; l < NUM_LINKS; l++) begin : g_busy
    localparam int A  = link_a(l);
    localparam int B  = link_b(l);
    localparam int PA = port_to(A, B);
    localparam int PB = port_to(B, A);
    assign link_busy[l][0] = out_valid[A-1][PA] && out_ready[A-1][PA];
    assign link_busy[l][1] = out_valid[B-1][PB] && out_ready[B-1][PB];
  end

endmodule
