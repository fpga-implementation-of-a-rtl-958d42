// route_lut_tb: checks the routing tables of all eight routers.
//
// Instantiates route_lut once per router with that router's table and, for
// every path table and packet ID, compares the output port with the port the
// reference path tables call for wherever the router lies on the packet's
// path. Also checks that IDs 13..15 and pt_sel 5..7 report no hit.
module route_lut_tb;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  pt_sel_t pt_sel;
  pkt_id_t id;
  port_t   port [NUM_ROUTERS];
  logic    hit  [NUM_ROUTERS];
  int      checks = 0, failures = 0;

  for (genvar r = 0; r < NUM_ROUTERS; r++) begin : g_r
    route_lut #(.LUT(router_lut(r + 1))) dut (
      .pt_sel (pt_sel), .id (id), .port (port[r]), .hit (hit[r]));
  end

  initial begin
    int e;
    for (int t = 0; t < 8; t++)
      for (int i = 0; i < 16; i++) begin
        pt_sel = pt_sel_t'(t);
        id     = pkt_id_t'(i);
        #1;
        for (int r = 0; r < NUM_ROUTERS; r++) begin
          checks++;
          if (hit[r] != (t < 5 && i < 13)) begin
            failures++;
            $display("FAIL r%0d pt%0d id%0d hit=%0b", r + 1, t, i, hit[r]);
          end
          if (t < 5 && i < 13) begin
            e = exp_port(r + 1, t, i);
            if (e >= 0) begin
              checks++;
              if (int'(port[r]) != e) begin
                failures++;
                $display("FAIL r%0d pt%0d id%0d port=%0d expected %0d", r + 1, t, i, port[r], e);
              end
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
