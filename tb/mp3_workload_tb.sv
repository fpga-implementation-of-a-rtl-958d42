// mp3_workload_tb: the Mp3 encoder traffic on the NoC, one millisecond per
// routing table, at the design's default sizes.
//
// The Mp3 encoder's flows send 1 to 145 thousand packets per second; one
// millisecond of traffic is therefore 1 to 145 packets per flow, 581 in all.
// At a 50 MHz clock a millisecond is 50,000 cycles, and each flow injects its
// packets evenly spaced over them. The run is repeated for each path table
// PT0..PT4 with the two links that table avoids marked failed (none for PT0),
// so each run is the network as it would operate on a chip with those links
// broken. Checks: every packet reaches its destination node, in order per
// flow, within the millisecond plus a short drain; each router forwards
// exactly the number of packets the reference paths put through it; the
// failed links stay idle. It prints the total router traversals per table
// and the energy they imply at 9.152 nJ per packet per router, the per-packet
// figure reported for an FPGA build of this router.
module mp3_workload_tb;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  localparam int CYCLES_PER_MS = 50_000;   // 50 MHz clock

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  pt_sel_t                 pt_sel;
  logic    [NUM_LINKS-1:0] link_fault;
  logic    [NUM_NODES-1:0] node_tx_valid, node_tx_ready, node_rx_valid, node_rx_ready;
  packet_t [NUM_NODES-1:0] node_tx_pkt, node_rx_pkt;
  logic    [NUM_LINKS-1:0][1:0] link_busy;
  logic    [NUM_ROUTERS-1:0]    router_fwd;

  fttg_noc_top dut (.*);

  always #10 clk = ~clk;                   // 20 ns period

  int checks = 0, failures = 0;
  int cyc = 0;
  int tx_cnt [13], rx_cnt [13], pend [13];
  int fwd [8];
  int fault_busy = 0;
  bit traffic_on = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // receivers
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < 13; n++)
      if (node_rx_valid[n]) begin
        int id, sq;
        id = int'(node_rx_pkt[n].id);
        sq = int'(node_rx_pkt[n].data[23:0]);
        checks++;
        if (id > 12 || DST[id] != n + 1 || sq != rx_cnt[id]) begin
          failures++;
          $display("FAIL node %0d got ID %0d seq %0d", n + 1, id, sq);
        end else rx_cnt[id]++;
      end
    for (int r = 0; r < 8; r++) if (router_fwd[r]) fwd[r]++;
    for (int l = 0; l < 9; l++) if (link_busy[l] != 0 && link_fault[l]) fault_busy++;
  end

  // senders: flow e becomes due every CYCLES_PER_MS / KPPS[e] cycles; a node
  // with several due flows sends them one per cycle.
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < 13; n++)
      if (node_tx_valid[n] && node_tx_ready[n]) begin
        tx_cnt[int'(node_tx_pkt[n].id)]++;
        pend[int'(node_tx_pkt[n].id)]--;
      end
    if (traffic_on) begin
      for (int e = 0; e < 13; e++)
        if (cyc % (CYCLES_PER_MS / KPPS[e]) == 0 && tx_cnt[e] + pend[e] < KPPS[e]) pend[e]++;
      cyc++;
    end
    #1;
    for (int n = 0; n < 13; n++) begin
      node_tx_valid[n] = 1'b0;
      for (int e = 12; e >= 0; e--)
        if (SRC[e] == n + 1 && pend[e] > 0) begin
          node_tx_valid[n] = 1'b1;
          node_tx_pkt[n]   = '{id: pkt_id_t'(e), data: 28'(tx_cnt[e])};
        end
    end
  end

  initial begin
    real   energy0;
    node_tx_valid = '0; node_tx_pkt = '0; node_rx_ready = '1;
    link_fault = '0; pt_sel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int pt = 0; pt < 5; pt++) begin
      int   exp_fwd [8];
      int   total, exp_total;
      real  energy;
      foreach (tx_cnt[e]) begin tx_cnt[e] = 0; rx_cnt[e] = 0; pend[e] = 0; end
      foreach (fwd[r]) begin fwd[r] = 0; exp_fwd[r] = 0; end
      pt_sel = pt_sel_t'(pt);
      link_fault = '0;
      if (pt > 0)
        for (int j = 0; j < 2; j++) link_fault[link_of(AVOID[pt][j][0], AVOID[pt][j][1])] = 1'b1;
      fault_busy = 0;
      cyc = 0;
      traffic_on = 1;
      repeat (CYCLES_PER_MS) @(posedge clk);
      traffic_on = 0;
      repeat (100) @(posedge clk);
      total = 0;
      exp_total = 0;
      for (int e = 0; e < 13; e++) begin
        check(tx_cnt[e] == KPPS[e] && rx_cnt[e] == KPPS[e],
              $sformatf("PT%0d flow %0d->%0d: sent %0d delivered %0d of %0d", pt,
                        SRC[e], DST[e], tx_cnt[e], rx_cnt[e], KPPS[e]));
        for (int k = 0; k < path_len(pt, e); k++) exp_fwd[PATHS[pt][e][k] - 1] += KPPS[e];
      end
      for (int r = 0; r < 8; r++) begin
        check(fwd[r] == exp_fwd[r], $sformatf("PT%0d router %0d forwarded %0d, expected %0d",
                                              pt, r + 1, fwd[r], exp_fwd[r]));
        total += fwd[r];
        exp_total += exp_fwd[r];
      end
      check(fault_busy == 0, $sformatf("PT%0d used a failed link", pt));
      energy = real'(total) * 1000.0 * 9.152e-9;   // per second of Mp3 traffic
      if (pt == 0) energy0 = energy;
      $display("FTTG(%0d): %0d router traversals per ms (expected %0d), %0.2f mJ/s, %0.0f%% of FTTG(0)",
               pt, total, exp_total, energy * 1.0e3, 100.0 * energy / energy0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5 * (CYCLES_PER_MS + 100) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
