// noc_router_tb: self-checking test of one router (r2, all four FIFOs used).
//
// Random packets whose IDs pass through r2 under the selected path table are
// offered on the input ports that lead into r2 for those IDs. Each packet's
// data holds its input port and a sequence number. At the outputs the
// testbench checks that each packet leaves on the port the reference path
// table gives, that exactly one port is valid, that packets from one input
// keep their order, that a packet counts as sent only when its port is ready,
// and that all packets come out. Random out_ready stalls
// fill the FIFOs, so back-pressure (in_ready low) and blocked heads occur and
// are counted. It also checks the one-cycle latency through an idle router and
// runs every path table. A second instance (r8) checks that neither its
// unused port nor the port of node 7, which only receives, has a FIFO. A
// third, five-port instance with a made-up table (ID i to port i mod 5 under
// PT0, (i+1) mod 5 under PT1) checks that the port count is a parameter.
module noc_router_tb;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  localparam int RID = 2;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  pt_sel_t                 pt_sel;
  logic    [NUM_PORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  packet_t [NUM_PORTS-1:0] in_pkt;
  packet_t                 out_pkt;
  logic                    fwd;
  logic    [NUM_PORTS-1:0] r8_in_ready, r8_out_valid;
  packet_t                 r8_out_pkt;
  logic                    r8_fwd;

  int checks = 0, failures = 0;
  int sent [NUM_PORTS], got [NUM_PORTS];
  int n_stall = 0, n_full = 0, n_fwd = 0;

  noc_router #(.ROUTER_ID(RID)) dut (.*);

  noc_router #(.ROUTER_ID(8)) dut8 (
    .clk (clk), .rst_n (rst_n), .pt_sel (pt_sel), .in_valid ('0), .in_pkt ('0),
    .in_ready (r8_in_ready), .out_valid (r8_out_valid), .out_pkt (r8_out_pkt),
    .out_ready ('1), .fwd (r8_fwd));

  // five-port router with a synthetic table
  typedef logic [NUM_PT-1:0][NUM_EDGES-1:0][2:0] lut5_t;
  function automatic lut5_t make_lut5();
    lut5_t l = '0;
    for (int t = 0; t < NUM_PT; t++)
      for (int i = 0; i < NUM_EDGES; i++) l[t][i] = 3'((i + t) % 5);
    return l;
  endfunction

  logic    [4:0] p5_in_valid, p5_in_ready, p5_out_valid;
  packet_t [4:0] p5_in_pkt;
  packet_t       p5_out_pkt;
  logic          p5_fwd;

  noc_router #(.NPORTS(5), .ROUTER_ID(1), .LUT(make_lut5()), .FIFO_USED(5'b11111)) dut5 (
    .clk (clk), .rst_n (rst_n), .pt_sel (pt_sel), .in_valid (p5_in_valid), .in_pkt (p5_in_pkt),
    .in_ready (p5_in_ready), .out_valid (p5_out_valid), .out_pkt (p5_out_pkt),
    .out_ready ('1), .fwd (p5_fwd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // input port of r2 through which packet id enters under table pt, -1 if none
  function automatic int in_port(int pt, int id);
    int res = -1;
    int n = path_len(pt, id);
    for (int k = 0; k < n; k++)
      if (PATHS[pt][id][k] == RID)
        for (int p = 0; p < 4; p++)
          if ((k == 0 && PEER[RID][p] == -SRC[id]) ||
              (k > 0 && PEER[RID][p] == PATHS[pt][id][k-1])) res = p;
    return res;
  endfunction

  // output monitor: route, one-hot valid, per-input order
  always @(posedge clk) if (rst_n) begin
    if (out_valid != 0) begin
      int ip, sq, ep;
      checks++;
      if (!$onehot(out_valid)) begin failures++; $display("FAIL valid not one-hot"); end
      ep = exp_port(RID, int'(pt_sel), int'(out_pkt.id));
      checks++;
      if (ep < 0 || !out_valid[ep]) begin
        failures++;
        $display("FAIL id %0d on ports %b, expected port %0d", out_pkt.id, out_valid, ep);
      end
      checks++;
      if (fwd != ((out_valid & out_ready) != 0)) begin
        failures++;
        $display("FAIL fwd=%0b but valid=%b ready=%b", fwd, out_valid, out_ready);
      end
      if ((out_valid & out_ready) != 0) begin
        ip = int'(out_pkt.data[27:26]);
        sq = int'(out_pkt.data[25:0]);
        checks++;
        if (sq != got[ip]) begin
          failures++;
          $display("FAIL input %0d: seq %0d, expected %0d", ip, sq, got[ip]);
        end
        got[ip]++;
        n_fwd++;
      end else n_stall++;
    end
    for (int p = 0; p < 4; p++) if (in_valid[p] && !in_ready[p]) n_full++;
  end

  // offer random packets for n cycles under table pt
  task automatic run(input int pt, input int n, input int ready_pct);
    int ids [4][$];
    pt_sel = pt_sel_t'(pt);
    foreach (ids[p]) ids[p].delete();
    for (int id = 0; id < 13; id++) begin
      int ip = in_port(pt, id);
      if (ip >= 0) ids[ip].push_back(id);
    end
    for (int c = 0; c < n; c++) begin
      for (int p = 0; p < 4; p++) begin
        if (!(in_valid[p] && !in_ready[p])) begin   // a refused packet is offered again
          in_valid[p] = ids[p].size() > 0 && $urandom_range(0, 1) == 1;
          if (in_valid[p]) begin
            in_pkt[p].id   = pkt_id_t'(ids[p][$urandom_range(0, ids[p].size() - 1)]);
            in_pkt[p].data = {2'(p), 26'(sent[p])};
          end
        end
      end
      for (int p = 0; p < 4; p++) out_ready[p] = ($urandom_range(0, 99) < ready_pct);
      @(posedge clk);
      for (int p = 0; p < 4; p++) if (in_valid[p] && in_ready[p]) sent[p]++;
      #1;
    end
    in_valid  = '0;
    out_ready = '1;
    repeat (40) @(posedge clk);
    #1;
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (got[p] != sent[p]) begin
        failures++;
        $display("FAIL pt%0d input %0d: sent %0d got %0d", pt, p, sent[p], got[p]);
      end
    end
  endtask

  initial begin
    in_valid = '0; in_pkt = '0; out_ready = '1; pt_sel = '0;
    p5_in_valid = '0; p5_in_pkt = '0;
    foreach (sent[p]) begin sent[p] = 0; got[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(r8_in_ready == 4'b0011, "r8 has no FIFO on the port of receive-only node 7 nor on its unused port");
    // latency: packet 6->7 (ID 7) offered at r2's node port leaves toward r4
    in_valid[3] = 1'b1;
    in_pkt[3]   = '{id: 4'd7, data: {2'd3, 26'd0}};
    @(posedge clk);
    sent[3]++;
    #1;
    in_valid = '0;
    check(out_valid == 4'b0010, "ID 7 leaves on port 1 one cycle after it was taken");
    @(posedge clk);
    #1;
    check(out_valid == '0, "router idle again");
    // five-port instance: one packet at a time, each input port in turn
    for (int t = 0; t < 2; t++) begin
      pt_sel = pt_sel_t'(t);
      for (int i = 0; i < 13; i++) begin
        int ip;
        ip = (i * 3) % 5;
        p5_in_valid[ip] = 1'b1;
        p5_in_pkt[ip]   = '{id: pkt_id_t'(i), data: 28'(i)};
        @(posedge clk);
        #1;
        p5_in_valid = '0;
        check(p5_out_valid == 5'(1 << ((i + t) % 5)) && p5_out_pkt.data == 28'(i) && p5_fwd,
              $sformatf("5-port router: PT%0d ID %0d on ports %b", t, i, p5_out_valid));
        @(posedge clk);
        #1;
      end
    end
    check(p5_in_ready == 5'b11111, "5-port router has five FIFOs");
    pt_sel = '0;
    for (int pt = 0; pt < 5; pt++) run(pt, 1500, (pt == 0) ? 100 : 35);
    check(n_stall > 0, "blocked output seen");
    check(n_full > 0, "full input FIFO seen");
    check(n_fwd > 1000, "packets forwarded");
    $display("router test: forwarded %0d, blocked %0d, refused %0d", n_fwd, n_stall, n_full);
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
