// route_lut: the hard-coded routing table of one router.
//
// A read-only table with one line per packet ID (13 lines, one per edge of the
// application's communication graph) holding the 2-bit output port, repeated
// for each of the five path tables PT0..PT4. pt_sel, driven from chip pins,
// picks the table in use: 0 is the default routing, 1..4 the alternative
// routings that each avoid two failed links. The read is combinational.
// An ID past the last line, or a pt_sel above 4, is outside the table: the
// lookup then flags hit low and returns port 0 (this design's choice; the
// source does not define such inputs).
//
// Contents are the LUT parameter, computed for each router from the path
// tables in noc_pkg; the default is router r1's table. NPORTS sets the port
// count of the router the table belongs to (four in this network) and with it
// the width of a line.
module route_lut
  import noc_pkg::*;
#(
  parameter int unsigned NPORTS = NUM_PORTS,
  parameter logic [NUM_PT-1:0][NUM_EDGES-1:0][$clog2(NPORTS)-1:0] LUT = router_lut(1)
) (
  input  pt_sel_t                    pt_sel,
  input  pkt_id_t                    id,
  output logic [$clog2(NPORTS)-1:0]  port,
  output logic                       hit
);
  always_comb begin
    hit  = (int'(pt_sel) < NUM_PT) && (int'(id) < NUM_EDGES);
    port = '0;
    if (hit) port = LUT[pt_sel][id];
  end
endmodule
