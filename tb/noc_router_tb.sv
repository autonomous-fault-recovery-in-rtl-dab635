// noc_router_tb: one router at (1,1) of a 4x4 mesh, driven on all five ports.
// Phases: idle-router latency (two cycles input to output); normal X-Y
// forwarding of random traffic; a faulty East buffer (packets redirected to
// other buffers); a faulty East neighbour (routing bits written on the way
// out, also into a packet that was already waiting when the neighbour failed); a router fault (forwarding by routing bits through the recovery
// switch); a demultiplexer fault (spare demultiplexer); a full router that
// holds its inputs; a disabled crossbar. Every packet must leave exactly once,
// intact, on the port the reference names.
module noc_router_tb;
  import noc_pkg::*;

  localparam int unsigned MX = 1, MY = 1;

  logic clk = 0, rst_n = 0, xbar_en = 1;
  logic [NPORT-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1, nbr_faulty = '0;
  packet_t in_pkt [NPORT];
  packet_t out_pkt [NPORT];
  logic router_err = 0, demux_err = 0;
  logic [NBUF-1:0] buf_err = '0, fs;
  logic router_faulty, use_spare_demux, router_full, bad_rbits;
  logic [NPORT-1:0] redirected;

  noc_router #(.MY_X(MX), .MY_Y(MY), .DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_redirect = 0, n_stamped = 0, n_recovery = 0, n_spare = 0,
      n_full = 0, n_xbar_off_cycles = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference
  function automatic port_e ref_xy(input coord_t cx, cy, dx, dy);
    if (dx > cx) return P_EAST;
    if (dx < cx) return P_WEST;
    if (dy > cy) return P_NORTH;
    if (dy < cy) return P_SOUTH;
    return P_LOCAL;
  endfunction

  packet_t txq [NPORT][$];
  packet_t exp_pkt  [int];
  port_e   exp_port [int];
  logic    accepted [NPORT];
  logic    ready_pct_low = 0;
  logic [NPORT-1:0] hold = '0;   // ports whose sink refuses packets
  int      next_id = 1;

  // Queue a packet on input port `ip`; in recovery mode the routing bits pick
  // the output, otherwise X-Y routing does.
  task automatic send(input int ip, input logic recovery, input int fdx = -1, input int fdy = -1);
    packet_t p, p_in;
    port_e   op;
    p = packet_t'({$urandom, $urandom, $urandom});
    if (fdx >= 0) begin p.dst_x = coord_t'(fdx); p.dst_y = coord_t'(fdy); end
    p.payload = 32'(next_id);
    p.rbits   = 3'($urandom % NPORT);
    op = recovery ? port_e'(p.rbits) : ref_xy(coord_t'(MX), coord_t'(MY), p.dst_x, p.dst_y);
    exp_port[next_id] = op;
    p_in = p;
    if (op != P_LOCAL && nbr_faulty[op]) begin
      coord_t fx, fy;
      fx = coord_t'(MX); fy = coord_t'(MY);
      if (op == P_EAST) fx++;
      if (op == P_WEST) fx--;
      if (op == P_NORTH) fy++;
      if (op == P_SOUTH) fy--;
      p.rbits = ref_xy(fx, fy, p.dst_x, p.dst_y);
      n_stamped++;
    end
    exp_pkt[next_id] = p;
    txq[ip].push_back(p_in);
    next_id++;
    n_sent++;
  endtask

  // drive / monitor, all on the falling edge
  initial begin
    for (int p = 0; p < NPORT; p++) begin accepted[p] = 0; in_pkt[p] = '0; end
    forever begin
      @(negedge clk);
      for (int p = 0; p < NPORT; p++) begin
        if (accepted[p]) void'(txq[p].pop_front());
        in_valid[p] = txq[p].size() > 0;
        if (txq[p].size() > 0) in_pkt[p] = txq[p][0];
        out_ready[p] = (ready_pct_low || hold[p]) ? 1'b0 : ($urandom % 4 != 0);
      end
      #3;
      for (int p = 0; p < NPORT; p++) accepted[p] = in_valid[p] && in_ready[p];
      if (router_full) n_full++;
      if (router_faulty) n_recovery += $countones(out_valid & out_ready);
      if (use_spare_demux) n_spare += $countones(out_valid & out_ready);
      n_redirect += $countones(redirected & in_valid & in_ready);
      for (int o = 0; o < NPORT; o++)
        if (out_valid[o] && out_ready[o]) begin
          int id;
          id = int'(out_pkt[o].payload);
          n_recv++;
          checks++;
          if (!exp_pkt.exists(id)) begin
            failures++;
            $display("FAIL unexpected or duplicate packet id %0d on port %0d", id, o);
          end else begin
            if (exp_port[id] != port_e'(o) || exp_pkt[id] != out_pkt[o]) begin
              failures++;
              $display("FAIL packet %0d on port %0d, expected port %0d", id, o, exp_port[id]);
            end
            exp_pkt.delete(id);
            exp_port.delete(id);
          end
        end
    end
  end

  task automatic drain(input int max_cycles);
    int c;
    c = 0;
    while ((exp_pkt.size() > 0) && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
    check(exp_pkt.size() == 0, "all packets delivered");
    for (int p = 0; p < NPORT; p++) txq[p].delete();
    exp_pkt.delete();
    exp_port.delete();
  endtask

  task automatic traffic(input int cycles, input logic recovery);
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk);
      for (int p = 0; p < NPORT; p++)
        if (txq[p].size() < 3 && ($urandom % 3 == 0)) send(p, recovery);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. latency of an idle router: valid at the input -> valid at the output
    begin
      int t0, t1;
      ready_pct_low = 0;
      @(posedge clk);
      send(int'(P_WEST), 0);
      @(negedge clk); t0 = int'($time);
      while (!(|out_valid)) @(negedge clk);
      t1 = int'($time);
      check((t1 - t0) / 10 == 2, "two cycles from input to output register");
      drain(50);
    end

    // 2. normal traffic
    traffic(2000, 0);
    drain(500);

    // 3. East buffer faulty
    @(negedge clk); buf_err[P_EAST] = 1;
    @(negedge clk); buf_err[P_EAST] = 0;
    check(fs == (NBUF'(1) << P_EAST), "FS_E raised");
    traffic(2000, 0);
    drain(500);
    check(n_redirect > 0, "East packets redirected");

    // 4. faulty East neighbour: routing bits written
    nbr_faulty[P_EAST] = 1;
    traffic(1000, 0);
    drain(500);
    check(n_stamped > 0, "routing bits written toward faulty neighbour");
    nbr_faulty = '0;

    // 4b. the East neighbour fails while a packet waits in the East output
    //     register: the packet must still leave with fresh routing bits
    begin
      int id;
      packet_t p;
      hold[P_EAST] = 1;
      id = next_id;
      send(int'(P_LOCAL), 0, 3, 0);
      p = exp_pkt[id];
      check(exp_port[id] == P_EAST, "test packet heads East");
      repeat (4) @(posedge clk);
      check(out_valid[P_EAST], "packet waiting in East output register");
      @(negedge clk);
      nbr_faulty[P_EAST] = 1;
      p.rbits = ref_xy(coord_t'(MX + 1), coord_t'(MY), p.dst_x, p.dst_y);
      check(p.rbits == 3'(P_EAST), "reference routing bits at (2,1) toward (3,0)");
      exp_pkt[id] = p;
      n_stamped++;
      hold[P_EAST] = 0;
      drain(50);
      nbr_faulty = '0;
    end

    // 5. full router: outputs blocked
    ready_pct_low = 1;
    traffic(100, 0);
    check(n_full > 0 && in_ready == '0, "full router refuses packets");
    ready_pct_low = 0;
    drain(500);

    // 6. crossbar disabled: nothing leaves
    xbar_en = 0;
    traffic(50, 0);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      check(out_valid == '0, "crossbar disabled");
      n_xbar_off_cycles++;
    end
    xbar_en = 1;
    drain(500);

    // 7. router fault: recovery switch forwards by routing bits
    @(negedge clk); router_err = 1;
    @(negedge clk); router_err = 0;
    check(router_faulty, "router marked faulty");
    traffic(2000, 1);
    drain(1000);
    check(n_recovery > 0, "packets forwarded by the recovery switch");

    // 8. demultiplexer fault: spare demultiplexer
    @(negedge clk); demux_err = 1;
    @(negedge clk); demux_err = 0;
    check(use_spare_demux, "spare demultiplexer selected");
    traffic(1000, 1);
    drain(1000);
    check(n_spare > 0, "packets through the spare demultiplexer");

    $display("sent=%0d received=%0d redirected=%0d stamped=%0d recovery=%0d spare=%0d full=%0d",
             n_sent, n_recv, n_redirect, n_stamped, n_recovery, n_spare, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
