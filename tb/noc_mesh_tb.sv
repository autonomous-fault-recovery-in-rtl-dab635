// noc_mesh_tb: end-to-end test of the 4x4 self-healing mesh at its default size.
//
// Every processing element injects packets to uniformly random destinations
// (uniform traffic). A scoreboard keyed by a packet id carried in the payload
// checks that each packet reaches its destination PE exactly once with all
// seven fields intact. Phases:
//   1. one packet corner to corner in an idle mesh: 7 routers, 2 cycles each;
//   2. uniform traffic, no faults, with PEs that sometimes refuse packets;
//   3. router 9 at (1,2) faulty: its neighbours write routing bits and it
//      forwards through its recovery switch; the East buffer of router 6
//      faulty: its packets are redirected to other buffers;
//   4. the main demultiplexer of router 9 faulty as well: the spare takes over;
//   5. crossbars disabled for a while: traffic stalls, then resumes;
//   6. PEs stop accepting: routers fill up and report full.
// Each mechanism is counted and a failure is counted for any that never happens.
module noc_mesh_tb;
  import noc_pkg::*;

  localparam int unsigned MX = 4, MY = 4, N = MX * MY;
  localparam int unsigned FAULTY = 9, BUF_FAULT_NODE = 6;

  logic clk = 0, rst_n = 0, xbar_en = 1;
  logic [N-1:0] pe_in_valid = '0, pe_in_ready, pe_out_valid, pe_out_ready = '1;
  packet_t pe_in_pkt [N];
  packet_t pe_out_pkt [N];
  logic [N-1:0] router_err = '0, demux_err = '0;
  logic [N-1:0][NBUF-1:0] buf_err = '0;
  logic [N-1:0] router_faulty, use_spare_demux, router_full, bad_rbits;
  logic [N-1:0][NBUF-1:0] fs;
  logic [N-1:0][NPORT-1:0] redirected;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_redirect = 0, n_full = 0, n_through_faulty = 0,
      n_to_faulty = 0, n_from_faulty = 0, n_spare = 0, n_stall = 0, n_bad = 0;
  int cycle = 0;

  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d, %0d packets outstanding", cycle, exp_pkt.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  packet_t txq [N][$];
  packet_t exp_pkt [int];
  int      exp_dst [int];
  int      exp_via [int];    // 1: path crosses the faulty router while it is faulty
  logic    accepted [N];
  logic    pe_refuse = 0;
  int      next_id = 1;

  // Does the X-Y path from s to d pass through router f (as source, transit or sink)?
  function automatic logic path_hits(input int s, input int d, input int f);
    int x, y, dx, dy;
    x = s % MX; y = s / MX; dx = d % MX; dy = d / MX;
    if (y * MX + x == f) return 1;
    while (x != dx) begin x += (dx > x) ? 1 : -1; if (y * MX + x == f) return 1; end
    while (y != dy) begin y += (dy > y) ? 1 : -1; if (y * MX + x == f) return 1; end
    return 0;
  endfunction

  task automatic send(input int s, input int d);
    packet_t p;
    p.dst_x   = coord_t'(d % MX);
    p.dst_y   = coord_t'(d / MX);
    p.src_x   = coord_t'(s % MX);
    p.src_y   = coord_t'(s / MX);
    p.seq     = 8'(next_id);
    p.tstamp  = 16'(cycle);
    p.payload = 32'(next_id);
    p.rbits   = '0;
    exp_pkt[next_id] = p;
    exp_dst[next_id] = d;
    exp_via[next_id] = router_faulty[FAULTY] && path_hits(s, d, FAULTY);
    txq[s].push_back(p);
    next_id++;
    n_sent++;
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin accepted[n] = 0; pe_in_pkt[n] = '0; end
    forever begin
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        if (accepted[n]) void'(txq[n].pop_front());
        pe_in_valid[n] = txq[n].size() > 0;
        if (txq[n].size() > 0) pe_in_pkt[n] = txq[n][0];
        pe_out_ready[n] = pe_refuse ? 1'b0 : ($urandom % 8 != 0);
      end
      #3;
      for (int n = 0; n < N; n++) accepted[n] = pe_in_valid[n] && pe_in_ready[n];
      n_full     += $countones(router_full);
      n_bad      += $countones(bad_rbits);
      for (int n = 0; n < N; n++) n_redirect += $countones(redirected[n]);
      for (int n = 0; n < N; n++)
        if (pe_out_valid[n] && pe_out_ready[n]) begin
          int id;
          packet_t got;
          got = pe_out_pkt[n];
          id  = int'(got.payload);
          n_recv++;
          checks++;
          if (!exp_pkt.exists(id)) begin
            failures++;
            $display("FAIL unexpected or duplicate packet %0d at PE %0d", id, n);
          end else begin
            got.rbits = '0;
            if (exp_dst[id] != n || got != exp_pkt[id]) begin
              failures++;
              $display("FAIL packet %0d at PE %0d, expected PE %0d", id, n, exp_dst[id]);
            end
            if (exp_via[id]) begin
              n_through_faulty++;
              if (n == int'(FAULTY)) n_to_faulty++;
              if (exp_pkt[id].src_x == coord_t'(FAULTY % MX) && exp_pkt[id].src_y == coord_t'(FAULTY / MX))
                n_from_faulty++;
              if (use_spare_demux[FAULTY]) n_spare++;
            end
            exp_pkt.delete(id);
            exp_dst.delete(id);
            exp_via.delete(id);
          end
        end
    end
  end

  task automatic traffic(input int cycles, input int rate_pct);
    int d;
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk);
      for (int s = 0; s < N; s++)
        if (txq[s].size() < 2 && ($urandom % 100 < rate_pct)) begin
          d = int'($urandom % (N - 1));
          if (d >= s) d++;
          send(s, d);
        end
    end
  endtask

  task automatic drain(input int max_cycles);
    int c;
    c = 0;
    while (exp_pkt.size() > 0 && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
    check(exp_pkt.size() == 0, "all packets delivered");
    if (exp_pkt.size() != 0) $display("  %0d packets outstanding", exp_pkt.size());
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. corner to corner latency
    begin
      int t0;
      @(posedge clk);
      send(0, N - 1);
      @(negedge clk); t0 = cycle;
      while (!pe_out_valid[N-1]) @(negedge clk);
      check(cycle - t0 == 2 * (MX + MY - 1), "two cycles per router, corner to corner");
      $display("corner-to-corner latency: %0d cycles", cycle - t0);
      drain(100);
    end

    // 2. uniform traffic, healthy network
    traffic(3000, 20);
    drain(3000);

    // 3. faulty router 9 and faulty East buffer of router 6
    @(negedge clk);
    router_err[FAULTY] = 1;
    buf_err[BUF_FAULT_NODE][P_EAST] = 1;
    @(negedge clk);
    router_err = '0;
    buf_err    = '0;
    check(router_faulty == (N'(1) << FAULTY), "only router 9 marked faulty");
    check(fs[BUF_FAULT_NODE] == (NBUF'(1) << P_EAST), "FS_E of router 6 raised");
    traffic(4000, 20);
    drain(4000);
    check(n_through_faulty > 0 && n_to_faulty > 0 && n_from_faulty > 0,
          "packets to, from and through the faulty router delivered");
    check(n_redirect > 0, "packets redirected from the faulty buffer");

    // 4. demultiplexer of router 9 faulty: spare demultiplexer
    @(negedge clk); demux_err[FAULTY] = 1;
    @(negedge clk); demux_err = '0;
    check(use_spare_demux[FAULTY], "spare demultiplexer selected");
    traffic(3000, 20);
    drain(4000);
    check(n_spare > 0, "packets through the spare demultiplexer");

    // 5. crossbars disabled
    xbar_en = 0;
    traffic(100, 20);
    repeat (4) @(posedge clk);
    begin
      int recv0;
      recv0 = n_recv;
      repeat (200) @(posedge clk);
      n_stall = 200;
      check(n_recv == recv0, "no delivery while the crossbars are disabled");
    end
    xbar_en = 1;
    drain(4000);

    // 6. PEs refuse packets: routers fill up
    pe_refuse = 1;
    traffic(600, 60);
    check(n_full > 0, "a router reported full");
    pe_refuse = 0;
    drain(8000);

    check(n_bad == 0, "no packet with invalid routing bits");
    $display("sent=%0d received=%0d through_faulty=%0d to_faulty=%0d from_faulty=%0d spare=%0d redirected=%0d full_cycles=%0d stall=%0d",
             n_sent, n_recv, n_through_faulty, n_to_faulty, n_from_faulty, n_spare, n_redirect, n_full, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
