// fttg_noc_top_tb: end-to-end test of the fault-tolerant NoC.
//
// The testbench plays the thirteen Mp3 encoder nodes. Each packet carries its
// flow (packet ID) and a per-flow sequence number; receivers check that a
// packet arrives at the flow's destination node and that each flow stays in
// order. Phases:
//  1. latency: every flow, alone in the idle network, under every path table,
//     must arrive after exactly one cycle per router on its reference path;
//  2. routing tables: random traffic on all flows under each table, with the
//     two links that table avoids marked failed; nothing may be lost, the
//     failed links must stay idle, and the router forward counts must equal
//     the sum of the reference path lengths (the table is switched between
//     runs while the network is empty);
//  3. the need for switching: a failed link l3,6 under the default table PT0
//     must lose exactly the packets of flow 1->9, which crosses it;
//  4. back-pressure: random rx_ready at the nodes and heavy injection, so node
//     ports see tx_ready low and routers hold packets at blocked outputs.
// Each mechanism (table switch, fault masking, lost packet, back-pressure,
// blocked output, every flow and every link used) is counted and must occur.
module fttg_noc_top_tb;
  import noc_pkg::*;
  import tb_ref_pkg::*;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  pt_sel_t                 pt_sel;
  logic    [NUM_LINKS-1:0] link_fault;
  logic    [NUM_NODES-1:0] node_tx_valid, node_tx_ready, node_rx_valid, node_rx_ready;
  packet_t [NUM_NODES-1:0] node_tx_pkt, node_rx_pkt;
  logic    [NUM_LINKS-1:0][1:0] link_busy;
  logic    [NUM_ROUTERS-1:0]    router_fwd;

  fttg_noc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int tx_seq [13], rx_seq [13], rx_cnt [13];
  int fwd_cnt = 0, fault_busy = 0;
  int link_cnt [9];
  int n_switch = 0, n_faulted = 0, n_lost = 0, n_backpress = 0, n_blocked = 0;
  int inj_pct = 30, rx_pct = 100;
  bit traffic_on = 0;
  bit allow_gap = 0;     // phase 3: lost packets leave gaps in one flow

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // receivers and monitors
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < 13; n++) begin
      if (node_rx_valid[n] && node_rx_ready[n]) begin
        int id, sq;
        id = int'(node_rx_pkt[n].id);
        sq = int'(node_rx_pkt[n].data[23:0]);
        checks++;
        if (id > 12 || DST[id] != n + 1) begin
          failures++;
          $display("FAIL node %0d got packet ID %0d", n + 1, id);
        end else begin
          checks++;
          if (sq != rx_seq[id] && !(allow_gap && sq > rx_seq[id])) begin
            failures++;
            $display("FAIL flow %0d: seq %0d, expected %0d", id, sq, rx_seq[id]);
          end
          rx_seq[id] = sq + 1;
          rx_cnt[id]++;
        end
      end
      if (node_rx_valid[n] && !node_rx_ready[n]) n_blocked++;
      if (node_tx_valid[n] && !node_tx_ready[n]) n_backpress++;
    end
    for (int r = 0; r < 8; r++) if (router_fwd[r]) fwd_cnt++;
    for (int l = 0; l < 9; l++) begin
      if (link_busy[l] != 0) link_cnt[l]++;
      if (link_busy[l] != 0 && link_fault[l]) fault_busy++;
    end
  end

  // senders: random injection on every flow while traffic_on
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < 13; n++)
      if (node_tx_valid[n] && node_tx_ready[n]) tx_seq[int'(node_tx_pkt[n].id)]++;
    #1;
    for (int n = 0; n < 13; n++) begin
      if (!(node_tx_valid[n] && !node_tx_ready[n])) begin
        int ids [$];
        ids.delete();
        for (int e = 0; e < 13; e++) if (SRC[e] == n + 1) ids.push_back(e);
        node_tx_valid[n] = traffic_on && ids.size() > 0 && ($urandom_range(0, 99) < inj_pct);
        if (node_tx_valid[n]) begin
          int e;
          e = ids[$urandom_range(0, ids.size() - 1)];
          node_tx_pkt[n] = '{id: pkt_id_t'(e), data: 28'(tx_seq[e])};
        end
      end
      node_rx_ready[n] = ($urandom_range(0, 99) < rx_pct);
    end
  end

  task automatic clear_counts();
    foreach (tx_seq[e]) begin tx_seq[e] = 0; rx_seq[e] = 0; rx_cnt[e] = 0; end
    fwd_cnt = 0;
  endtask

  task automatic set_table(input int pt);
    if (pt_sel != pt_sel_t'(pt)) n_switch++;
    pt_sel = pt_sel_t'(pt);
  endtask

  task automatic fail_avoided_links(input int pt);
    link_fault = '0;
    if (pt > 0)
      for (int j = 0; j < 2; j++) link_fault[link_of(AVOID[pt][j][0], AVOID[pt][j][1])] = 1'b1;
    if (link_fault != 0) n_faulted++;
  endtask

  task automatic drain();
    traffic_on = 0;
    rx_pct = 100;
    repeat (200) @(posedge clk);
  endtask

  initial begin
    node_tx_valid = '0; node_tx_pkt = '0; node_rx_ready = '1;
    link_fault = '0; pt_sel = '0;
    foreach (link_cnt[l]) link_cnt[l] = 0;
    clear_counts();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(node_tx_ready == ~(13'(1) << 6 | 13'(1) << 7 | 13'(1) << 12),
          "only receive-only nodes 7, 8, 13 have no injection FIFO");

    // 1. latency of each flow in an idle network
    for (int pt = 0; pt < 5; pt++) begin
      set_table(pt);
      for (int e = 0; e < 13; e++) begin
        int lat;
        bit seen;
        int s, d;
        s = SRC[e] - 1;
        d = DST[e] - 1;
        @(negedge clk);
        node_tx_valid[s] = 1'b1;
        node_tx_pkt[s]   = '{id: pkt_id_t'(e), data: 28'(tx_seq[e])};
        @(posedge clk);          // taken by the first router here
        #2;
        node_tx_valid[s] = 1'b0;
        lat  = 0;
        seen = 0;
        while (!seen && lat < 20) begin
          lat++;                 // delivered at the edge that ends this cycle?
          seen = node_rx_valid[d];
          if (!seen) begin
            @(posedge clk);
            #2;
          end
        end
        check(lat == path_len(pt, e), $sformatf(
              "PT%0d flow %0d->%0d latency %0d, expected %0d", pt, SRC[e], DST[e],
              lat, path_len(pt, e)));
        @(posedge clk);
      end
      repeat (5) @(posedge clk);
    end
    clear_counts();

    // 2. each table with its avoided links failed
    for (int pt = 0; pt < 5; pt++) begin
      int exp_fwd;
      set_table(pt);
      fail_avoided_links(pt);
      fault_busy = 0;
      inj_pct = 20;
      traffic_on = 1;
      repeat (3000) @(posedge clk);
      drain();
      exp_fwd = 0;
      for (int e = 0; e < 13; e++) begin
        check(rx_cnt[e] == tx_seq[e] && tx_seq[e] > 0,
              $sformatf("PT%0d flow %0d: sent %0d delivered %0d", pt, e, tx_seq[e], rx_cnt[e]));
        exp_fwd += rx_cnt[e] * path_len(pt, e);
      end
      check(fault_busy == 0, $sformatf("PT%0d used a failed link", pt));
      check(fwd_cnt == exp_fwd, $sformatf("PT%0d router forwards %0d, expected %0d",
                                          pt, fwd_cnt, exp_fwd));
      clear_counts();
    end

    // 3. default table with link l3,6 failed: flow 1->9 (ID 2) is lost
    set_table(0);
    link_fault = '0;
    link_fault[link_of(3, 6)] = 1'b1;
    allow_gap = 1;
    traffic_on = 1;
    repeat (2000) @(posedge clk);
    drain();
    for (int e = 0; e < 13; e++) begin
      if (e == 2) begin
        check(rx_cnt[e] == 0 && tx_seq[e] > 0, "flow 1->9 lost on failed l3,6 under PT0");
        n_lost += tx_seq[e];
      end else
        check(rx_cnt[e] == tx_seq[e], $sformatf("PT0 flow %0d unaffected by l3,6", e));
    end
    allow_gap = 0;
    link_fault = '0;
    clear_counts();

    // 4. back-pressure: heavy injection, slow receivers, alternate tables
    for (int pt = 0; pt < 5; pt++) begin
      set_table(pt);
      inj_pct = 90;
      rx_pct = 30;
      traffic_on = 1;
      repeat (2000) @(posedge clk);
      drain();
      repeat (800) @(posedge clk);
      for (int e = 0; e < 13; e++)
        check(rx_cnt[e] == tx_seq[e], $sformatf("heavy PT%0d flow %0d: sent %0d delivered %0d",
                                                pt, e, tx_seq[e], rx_cnt[e]));
      clear_counts();
    end

    check(n_switch >= 5, "routing table switched");
    check(n_faulted >= 4, "link faults injected");
    check(n_lost > 0, "packets lost on a failed link");
    check(n_backpress > 0, "node injection back-pressure");
    check(n_blocked > 0, "router output blocked by receiver");
    for (int l = 0; l < 9; l++) check(link_cnt[l] > 0, $sformatf("link %0d used", l));
    $display("table switches %0d, fault sets %0d, lost %0d, back-pressure %0d, blocked %0d",
             n_switch, n_faulted, n_lost, n_backpress, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
