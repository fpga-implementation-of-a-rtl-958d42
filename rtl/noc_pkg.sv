// noc_pkg: shared types, constants and topology data of the fault-tolerant
// application-specific NoC (FTTG topology) that carries the Mp3 encoder traffic.
//
// Packets are 32 bits: a 4-bit packet ID in the top bits and 28 data bits. A
// packet ID names one edge of the Mp3 encoder communication flow graph (13
// edges), so every router can route a packet by its ID alone through a small
// hard-coded table (LUT) with one line per edge.
//
// The topology has eight four-port routers r1..r8 joined by nine links
// (l1,2 l1,3 l2,4 l2,5 l3,6 l3,7 l4,8 l5,6 l7,8) and thirteen application nodes.
// Routing follows five path tables: PT0 is the default shortest-path routing and
// PT1..PT4 each reroute the few flows needed to avoid two failed links. The path
// tables, the link list and the node-to-router mapping follow the published
// routing tables of this design; the order of the ports on each router and the
// numbering of packet IDs (the order of the edges in the default path table)
// are this design's own choices.
//
// The per-router LUT contents and the mask of used input FIFOs are not typed in
// by hand: the constant functions at the end derive them from the path tables
// at elaboration time. For router r and path table t, the LUT line of packet
// ID e holds the port of r that leads to the next router on the path of e, or
// the port of the destination node if r is the last router of that path.
package noc_pkg;

  // ---------------------------------------------------------------- packet
  localparam int unsigned PKT_W      = 32;              // packet size
  localparam int unsigned ID_W       = 4;               // ceil(log2(13))
  localparam int unsigned DATA_W     = PKT_W - ID_W;    // 28 payload bits
  localparam int unsigned NUM_PORTS  = 4;               // four-port routers
  localparam int unsigned PORT_W     = 2;               // log2(NUM_PORTS)
  localparam int unsigned FIFO_DEPTH = 8;               // packets per input FIFO
  localparam int unsigned NUM_EDGES  = 13;              // CFG edges = LUT lines
  localparam int unsigned NUM_NODES  = 13;              // Mp3 encoder nodes
  localparam int unsigned NUM_ROUTERS = 8;
  localparam int unsigned NUM_LINKS  = 9;
  localparam int unsigned NUM_PT     = 5;               // PT0 (default) .. PT4
  localparam int unsigned PT_SEL_W   = 3;               // routing table select pins
  localparam int unsigned MAX_PATH   = 7;               // longest path, in routers

  typedef logic [ID_W-1:0]     pkt_id_t;
  typedef logic [PORT_W-1:0]   port_t;
  typedef logic [PT_SEL_W-1:0] pt_sel_t;

  typedef struct packed {
    pkt_id_t           id;
    logic [DATA_W-1:0] data;
  } packet_t;

  // LUT of one router: [path table][packet ID] -> output port
  typedef logic [NUM_PT-1:0][NUM_EDGES-1:0][PORT_W-1:0] lut_t;

  // ---------------------------------------------------------------- CFG edges
  // Packet ID e is CFG edge e: source node -> destination node (nodes 1..13).
  localparam int EDGE_SRC [NUM_EDGES] = '{1, 1, 1, 2, 3, 4, 5, 6, 6,  9, 10, 11, 12};
  localparam int EDGE_DST [NUM_EDGES] = '{2, 3, 9, 5, 4, 5, 6, 7, 8, 10, 13, 12, 13};

  // ---------------------------------------------------------------- topology
  // Peer of each router port: 1..8 is a router, NODE+n is application node n,
  // 0 is an unused port. Index [r-1][port].
  localparam int NODE = 100;
  localparam int PORT_PEER [NUM_ROUTERS][NUM_PORTS] = '{
    '{2,       3,       NODE+4,  NODE+5 },   // r1
    '{1,       4,       5,       NODE+6 },   // r2
    '{1,       6,       7,       NODE+2 },   // r3
    '{2,       8,       NODE+8,  NODE+13},   // r4
    '{2,       6,       NODE+9,  NODE+10},   // r5
    '{3,       5,       NODE+11, NODE+12},   // r6
    '{3,       8,       NODE+1,  NODE+3 },   // r7
    '{4,       7,       NODE+7,  0      }    // r8
  };

  // Links l(a,b), a < b, in this order; index used by link fault/activity ports.
  localparam int LINK_A [NUM_LINKS] = '{1, 1, 2, 2, 3, 3, 4, 5, 7};
  localparam int LINK_B [NUM_LINKS] = '{2, 3, 4, 5, 6, 7, 8, 6, 8};

  // ---------------------------------------------------------------- path tables
  // A path is the sequence of routers a packet visits, written as hex digits
  // from the most significant nibble down, zero-terminated: 7->3->6->5 is
  // 28'h7365_000.
  typedef logic [4*MAX_PATH-1:0] path_t;

  // PT0, the default shortest-path routing, indexed by packet ID.
  localparam path_t PT0_PATH [NUM_EDGES] = '{
    28'h7300_000,   // 1 -> 2
    28'h7000_000,   // 1 -> 3
    28'h7365_000,   // 1 -> 9
    28'h3100_000,   // 2 -> 5
    28'h7310_000,   // 3 -> 4
    28'h1000_000,   // 4 -> 5
    28'h1200_000,   // 5 -> 6
    28'h2480_000,   // 6 -> 7
    28'h2400_000,   // 6 -> 8
    28'h5000_000,   // 9 -> 10
    28'h5240_000,   // 10 -> 13
    28'h6000_000,   // 11 -> 12
    28'h6524_000    // 12 -> 13
  };

  // PT1..PT4: only the flows that differ from PT0.
  localparam int NUM_OVR = 13;
  localparam int    OVR_PT   [NUM_OVR] = '{1, 1,  2, 2, 2, 2,  3, 3, 3,  4, 4, 4, 4};
  localparam int    OVR_EDGE [NUM_OVR] = '{2, 7,  7, 8, 10, 12,  2, 6, 12,  0, 2, 3, 4};
  localparam path_t OVR_PATH [NUM_OVR] = '{
    28'h7312_500,   // PT1 (l3,6 l4,8 failed)  1 -> 9
    28'h2137_800,   // PT1                     6 -> 7
    28'h2137_800,   // PT2 (l2,4 l2,5 failed)  6 -> 7
    28'h2137_840,   // PT2                     6 -> 8
    28'h5637_840,   // PT2                     10 -> 13
    28'h6378_400,   // PT2                     12 -> 13
    28'h7842_500,   // PT3 (l1,2 l5,6 failed)  1 -> 9
    28'h1378_420,   // PT3                     5 -> 6
    28'h6378_400,   // PT3                     12 -> 13
    28'h7842_563,   // PT4 (l1,3 l3,7 failed)  1 -> 2
    28'h7842_500,   // PT4                     1 -> 9
    28'h3652_100,   // PT4                     2 -> 5
    28'h7842_100    // PT4                     3 -> 4
  };

  // ---------------------------------------------------------------- functions
  // Path of packet ID e under path table pt.
  function automatic path_t path_of(int pt, int e);
    path_t p;
    p = PT0_PATH[e];
    for (int i = 0; i < NUM_OVR; i++)
      if (OVR_PT[i] == pt && OVR_EDGE[i] == e) p = OVR_PATH[i];
    return p;
  endfunction

  // k-th router (0-based) on a path, 0 past its end.
  function automatic int hop(path_t p, int k);
    return int'(p[4*(MAX_PATH-1-k) +: 4]);
  endfunction

  // Peer code of port p of router r (1..8).
  function automatic int peer_of(int r, int p);
    return PORT_PEER[r-1][p];
  endfunction

  // Routers joined by link l.
  function automatic int link_a(int l);
    return LINK_A[l];
  endfunction

  function automatic int link_b(int l);
    return LINK_B[l];
  endfunction

  // Port of router r that connects to peer code `peer`, -1 if none.
  function automatic int port_to(int r, int peer);
    int res;
    res = -1;
    for (int p = 0; p < NUM_PORTS; p++)
      if (PORT_PEER[r-1][p] == peer) res = p;
    return res;
  endfunction

  // Index of link between routers a and b, -1 if none.
  function automatic int link_index(int a, int b);
    int res;
    res = -1;
    for (int l = 0; l < NUM_LINKS; l++)
      if ((LINK_A[l] == a && LINK_B[l] == b) || (LINK_A[l] == b && LINK_B[l] == a)) res = l;
    return res;
  endfunction

  // LUT contents of router r (1..8).
  function automatic lut_t router_lut(int r);
    lut_t  lut;
    path_t p;
    int    nxt;
    lut = '0;
    for (int t = 0; t < NUM_PT; t++)
      for (int e = 0; e < NUM_EDGES; e++) begin
        p = path_of(t, e);
        for (int k = 0; k < MAX_PATH; k++)
          if (hop(p, k) == r) begin
            nxt = (k + 1 < MAX_PATH) ? hop(p, k + 1) : 0;
            if (nxt == 0) lut[t][e] = port_t'(port_to(r, NODE + EDGE_DST[e]));
            else          lut[t][e] = port_t'(port_to(r, nxt));
          end
      end
    return lut;
  endfunction

  // Input ports of router r that receive traffic under some path table; the
  // FIFOs of the other ports are left out.
  function automatic logic [NUM_PORTS-1:0] router_fifo_used(int r);
    logic [NUM_PORTS-1:0] used;
    path_t p;
    used = '0;
    for (int t = 0; t < NUM_PT; t++)
      for (int e = 0; e < NUM_EDGES; e++) begin
        p = path_of(t, e);
        for (int k = 0; k < MAX_PATH; k++)
          if (hop(p, k) == r) begin
            if (k == 0) used[port_to(r, NODE + EDGE_SRC[e])] = 1'b1;
            else        used[port_to(r, hop(p, k - 1))]      = 1'b1;
          end
      end
    return used;
  endfunction

endpackage
