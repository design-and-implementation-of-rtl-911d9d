// End-to-end test of cpn_router: six routers with default parameters wired
// as the published test network (addresses 8, 1, 2, 3, 4, 5; links 8-1,
// 8-2, 1-2, 1-3, 1-4, 2-3, 2-4, 3-4, 3-5, 4-5). A host on the unused port 3
// of router 8 sends smart packets with QoS 1 from 8 to 5. Links 8->1, 1->3
// and 3->5 carry a high reward, all others a low one, so the network should
// learn the route 8-1-3-5.
//  phase 1: 30 packets, learning from their acknowledgments; the last 8
//           arrivals must all have taken 8-1-3-5;
//  phase 2: link 3-5 is cut; packets must still arrive, never over 3-5;
//  phase 3: link 3-5 is restored; the route 8-1-3-5 must come back.
// Every mechanism of the router is counted and must occur at least once:
// table misses (random ports) and hits, candidate skipping, direct
// forwarding to a neighbour, SPP fallback when that link is down, reward
// and punishment, learning on a stored model, acknowledgment generation
// and delivery at the source, and a smart packet served while the same SPP
// was learning.
module tb_cpn_network;
  import cpn_pkg::*;
  localparam int R = 6, N = N_PORTS;
  localparam logic [ADDR_W-1:0] ADDR [R] = '{32'd8, 32'd1, 32'd2, 32'd3, 32'd4, 32'd5};
  localparam int NB [R][N] = '{'{1, 2, 0, 0}, '{8, 2, 3, 4}, '{8, 1, 3, 4},
                               '{1, 2, 4, 5}, '{1, 2, 3, 5}, '{3, 4, 0, 0}};
  // far end (router index, port) of each port, -1 if none
  localparam int PR [R][N] = '{'{1, 2, -1, -1}, '{0, 2, 3, 4}, '{0, 1, 3, 4},
                               '{1, 2, 4, 5}, '{1, 2, 3, 5}, '{3, 4, -1, -1}};
  localparam int PP [R][N] = '{'{0, 0, -1, -1}, '{0, 1, 0, 0}, '{1, 1, 1, 1},
                               '{2, 2, 2, 0}, '{3, 3, 2, 1}, '{3, 3, -1, -1}};
  localparam logic [P_W-1:0] HIGH = 16'h6000, LOW = 16'h0010;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic [R-1:0][N-1:0] link_ok;
  logic [R-1:0][N-1:0] in_valid, in_ready, out_valid, out_ready;
  packet_t [R-1:0][N-1:0] in_pkt, out_pkt;
  logic [R-1:0][N-1:0][P_W-1:0] reward;
  logic [R-1:0][N-1:0][ADDR_W-1:0] nbr;
  logic [R-1:0] ev_arrived, ev_direct, ev_spp, ev_learn, ev_rewarded, ev_punished,
                ev_model_hit, ev_delivered, ev_drop;
  logic inj_valid = 0;
  packet_t inj_pkt;

  int checks = 0, failures = 0;

  // links: a packet crosses only while the link is up, otherwise it is lost
  always_comb begin
    for (int a = 0; a < R; a++)
      for (int p = 0; p < N; p++) begin
        in_valid[a][p] = 1'b0;
        in_pkt[a][p]   = '0;
        out_ready[a][p] = 1'b1;
        if (PR[a][p] >= 0) begin
          in_valid[a][p]  = link_ok[a][p] && out_valid[PR[a][p]][PP[a][p]];
          in_pkt[a][p]    = out_pkt[PR[a][p]][PP[a][p]];
          out_ready[a][p] = !link_ok[a][p] || in_ready[PR[a][p]][PP[a][p]];
        end
      end
    in_valid[0][3] = inj_valid;
    in_pkt[0][3]   = inj_pkt;
  end

  always_comb
    for (int a = 0; a < R; a++)
      for (int p = 0; p < N; p++) begin
        nbr[a][p]    = ADDR_W'(NB[a][p]);
        reward[a][p] = LOW;
      end
  assign reward[0][0] = HIGH;   // 8 -> 1
  assign reward[1][2] = HIGH;   // 1 -> 3
  assign reward[3][3] = HIGH;   // 3 -> 5

  // SPP activity counters
  int n_miss = 0, n_hit = 0, n_skip = 0, n_concurrent = 0;

  for (genvar a = 0; a < R; a++) begin : g_r
    cpn_router u_router (
      .clk, .rst_n, .my_addr(ADDR[a]), .neighbor_addr(nbr[a]), .link_up(link_ok[a]),
      .link_reward(reward[a]),
      .in_valid(in_valid[a]), .in_pkt(in_pkt[a]), .in_ready(in_ready[a]),
      .out_valid(out_valid[a]), .out_pkt(out_pkt[a]), .out_ready(out_ready[a]),
      .ev_arrived(ev_arrived[a]), .ev_direct(ev_direct[a]), .ev_spp(ev_spp[a]),
      .ev_learn(ev_learn[a]), .ev_rewarded(ev_rewarded[a]), .ev_punished(ev_punished[a]),
      .ev_model_hit(ev_model_hit[a]), .ev_delivered(ev_delivered[a]), .ev_drop(ev_drop[a])
    );
    logic hit_q, learning;
    port_t prim_q;
    always @(posedge clk) begin
      if (u_router.u_spp.start_ack) learning <= 1'b1;
      if (u_router.u_spp.done_ack || !rst_n) learning <= 1'b0;
      if (u_router.u_spp.t1_done) begin
        hit_q  <= u_router.u_spp.t1_hit;
        prim_q <= u_router.u_spp.t1_dec.primary;
        if (u_router.u_spp.t1_hit) n_hit++; else n_miss++;
      end
      if (u_router.u_spp.done_sp) begin
        if (hit_q && u_router.u_spp.out_port_sp != prim_q) n_skip++;
        if (learning) n_concurrent++;
      end
    end
  end

  // event counters
  int n_arrived = 0, n_direct = 0, n_spp = 0, n_learn = 0, n_rew = 0, n_pun = 0,
      n_mhit = 0, n_deliv = 0, n_drop = 0, n_fallback = 0;
  logic cut35 = 0;
  always @(posedge clk) begin
    n_arrived += $countones(ev_arrived);
    n_direct  += $countones(ev_direct);
    n_spp     += $countones(ev_spp);
    n_learn   += $countones(ev_learn);
    n_rew     += $countones(ev_rewarded);
    n_pun     += $countones(ev_punished);
    n_mhit    += $countones(ev_model_hit);
    n_deliv   += $countones(ev_delivered);
    if (rst_n) n_drop += $countones(ev_drop);
    if (cut35 && ev_spp[3]) n_fallback++;
  end

  // smart packets reaching router 5: record their routes
  int routes_ok_window [$];
  int arrivals = 0, used35_while_cut = 0;
  always @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (in_valid[5][p] && in_ready[5][p] && in_pkt[5][p].ptype == PKT_SMART) begin
        automatic packet_t k = in_pkt[5][p];
        automatic string s = "";
        automatic logic good;
        for (int i = 0; i < int'(k.len); i++) s = {s, $sformatf("%0d ", k.cm[i].addr)};
        good = (k.len == 4) && k.cm[0].addr == 8 && k.cm[1].addr == 1 &&
               k.cm[2].addr == 3 && k.cm[3].addr == 5;
        routes_ok_window.push_back(good);
        if (cut35 && k.len >= 2 && k.cm[k.len-2].addr == 3) used35_while_cut++;
        arrivals++;
        $display("%0t: smart packet at router 5, route %s", $time, s);
      end
  end

  task automatic send_smart();
    inj_pkt = '0;
    inj_pkt.ptype = PKT_SMART;
    inj_pkt.qsd = '{qos: 4'd1, src: 32'd8, dst: 32'd5};
    inj_pkt.len = 1;
    inj_pkt.cm[0] = '{addr: 32'd8, reward: 16'h0};
    @(negedge clk);
    while (!in_ready[0][3]) @(negedge clk);
    inj_valid = 1;
    @(negedge clk);
    inj_valid = 0;
  endtask

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-40s %0d", what, n);
  endtask

  initial begin
    link_ok = '0;
    for (int a = 0; a < R; a++)
      for (int p = 0; p < N; p++) link_ok[a][p] = (PR[a][p] >= 0);
    inj_pkt = '0;
    repeat (4) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);

    // phase 1: learning
    for (int i = 0; i < 30; i++) begin send_smart(); repeat (250) @(negedge clk); end
    repeat (600) @(negedge clk);
    begin
      automatic int good = 0, n = routes_ok_window.size();
      for (int i = n - 8; i < n; i++) if (i >= 0 && routes_ok_window[i]) good++;
      checks++;
      if (n < 8 || good != 8) begin failures++; $display("FAIL learned route: %0d of last 8 took 8-1-3-5 (%0d arrivals)", good, n); end
    end

    // phase 2: cut link 3-5
    link_ok[3][3] = 0; link_ok[5][0] = 0; cut35 = 1;
    begin
      automatic int arr_start = arrivals;
      for (int i = 0; i < 10; i++) begin send_smart(); repeat (300) @(negedge clk); end
      repeat (600) @(negedge clk);
      checks += 2;
      if (arrivals == arr_start) begin failures++; $display("FAIL nothing arrived while 3-5 was cut"); end
      if (used35_while_cut != 0) begin failures++; $display("FAIL packet crossed the cut link"); end
    end
    cut35 = 0;

    // phase 3: restore link 3-5
    link_ok[3][3] = 1; link_ok[5][0] = 1;
    for (int i = 0; i < 10; i++) begin send_smart(); repeat (250) @(negedge clk); end
    repeat (600) @(negedge clk);
    checks++;
    if (!routes_ok_window[routes_ok_window.size()-1]) begin failures++; $display("FAIL route 8-1-3-5 not restored"); end

    $display("mechanisms:");
    expect_count("smart packets at destination", n_arrived);
    expect_count("table miss (random port)", n_miss);
    expect_count("table hit (stored decision)", n_hit);
    expect_count("candidate skipped (select next)", n_skip);
    expect_count("direct forward to neighbour", n_direct);
    expect_count("SPP route request", n_spp);
    expect_count("SPP fallback, neighbour link down", n_fallback);
    expect_count("learning update", n_learn);
    expect_count("reward", n_rew);
    expect_count("punishment", n_pun);
    expect_count("update on stored model", n_mhit);
    expect_count("ACK delivered at source", n_deliv);
    expect_count("smart packet served while learning", n_concurrent);
    $display("  %-40s %0d", "dropped packets", n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
