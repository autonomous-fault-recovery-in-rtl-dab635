// noc_fault_campaign_tb: the 4x4 mesh under uniform traffic while a fault
// generator retires parts at random, epoch after epoch.
//
// Each epoch the generator fails every healthy component with a fixed
// probability: a router's routing logic (1 in 12), each buffer (1 in 16) and
// the main demultiplexer (1 in 16), up to three faulty routers and four faulty
// buffers in the mesh, at most one per router. Beyond that, redirected packets
// heading in opposite directions can fill each other's buffers in
// neighbouring routers and the mesh deadlocks: buffer sharing gives up the
// deadlock freedom of X-Y routing. It strikes only while the network
// is idle, since a buffer that fails while holding packets loses them. Faults accumulate: they
// are permanent. After each strike every PE sends uniform random traffic and
// the scoreboard checks that every packet arrives at its destination exactly
// once and intact. The reliability printed at the end is packets delivered
// over packets sent, with the number of faulty components reached.
module noc_fault_campaign_tb;
  import noc_pkg::*;

  localparam int unsigned MX = 4, MY = 4, N = MX * MY;
  localparam int unsigned EPOCHS = 12;
  localparam int unsigned MAX_BUF_FAULTS = 1;   // retired buffers per router
  localparam int unsigned MAX_ROUTERS    = 3;   // faulty routers in the mesh
  localparam int unsigned MAX_BUFFERS    = 4;   // faulty buffers in the mesh
  int n_rf = 0, n_bf = 0;

  logic clk = 0, rst_n = 0, xbar_en = 1;
  logic [N-1:0] pe_in_valid, pe_in_ready, pe_out_valid, pe_out_ready;
  packet_t pe_in_pkt [N];
  packet_t pe_out_pkt [N];
  logic [N-1:0] router_err, demux_err;
  logic [N-1:0][NBUF-1:0] buf_err;
  logic [N-1:0] router_faulty, use_spare_demux, router_full, bad_rbits;
  logic [N-1:0][NBUF-1:0] fs;
  logic [N-1:0][NPORT-1:0] redirected;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0, n_faults = 0, n_redirect = 0, n_bad = 0;
  int cycle = 0;

  always @(posedge clk) cycle++;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
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
  logic    accepted [N];
  int      next_id = 1;

  task automatic send(input int s, input int d);
    packet_t p;
    p.dst_x   = coord_t'(d % MX);
    p.dst_y   = coord_t'(d / MX);
    p.src_x   = coord_t'(s % MX);
    p.src_y   = coord_t'(s / MX);
    p.seq     = 8'(next_id);
    p.tstamp  = 16'(cycle);
    p.payload = 32'(next_id);
    p.rbits   = 3'($urandom);
    exp_pkt[next_id] = p;
    exp_dst[next_id] = d;
    txq[s].push_back(p);
    next_id++;
    n_sent++;
  endtask

  initial begin
    pe_in_valid = '0; pe_out_ready = '1;
    router_err = '0; demux_err = '0; buf_err = '0;
    for (int n = 0; n < N; n++) begin accepted[n] = 0; pe_in_pkt[n] = '0; end
    forever begin
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        if (accepted[n]) void'(txq[n].pop_front());
        pe_in_valid[n] = txq[n].size() > 0;
        if (txq[n].size() > 0) pe_in_pkt[n] = txq[n][0];
        pe_out_ready[n] = ($urandom % 8 != 0);
      end
      #3;
      for (int n = 0; n < N; n++) accepted[n] = pe_in_valid[n] && pe_in_ready[n];
      n_bad += $countones(bad_rbits);
      for (int n = 0; n < N; n++) n_redirect += $countones(redirected[n]);
      for (int n = 0; n < N; n++)
        if (pe_out_valid[n] && pe_out_ready[n]) begin
          int id;
          packet_t got;
          got = pe_out_pkt[n];
          id  = int'(got.payload);
          checks++;
          if (!exp_pkt.exists(id)) begin
            failures++;
            $display("FAIL unexpected or duplicate packet %0d at PE %0d", id, n);
          end else begin
            got.rbits = exp_pkt[id].rbits;
            if (exp_dst[id] != n || got != exp_pkt[id]) begin
              failures++;
              $display("FAIL packet %0d at PE %0d, expected PE %0d", id, n, exp_dst[id]);
            end else n_recv++;
            exp_pkt.delete(id);
            exp_dst.delete(id);
          end
        end
    end
  end

  // fault generator: one strike over the whole mesh
  task automatic strike();
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      if (!router_faulty[n] && n_rf < MAX_ROUTERS && $urandom % 12 == 0) begin
        router_err[n] = 1; n_faults++; n_rf++;
      end
      if (!use_spare_demux[n] && $urandom % 16 == 0) begin demux_err[n] = 1; n_faults++; end
      for (int b = 0; b < NBUF; b++)
        if (!fs[n][b] && $countones(fs[n] | buf_err[n]) < MAX_BUF_FAULTS && n_bf < MAX_BUFFERS &&
            $urandom % 16 == 0) begin
          buf_err[n][b] = 1; n_faults++; n_bf++;
        end
    end
    @(negedge clk);
    router_err = '0; demux_err = '0; buf_err = '0;
  endtask

  initial begin
    int d, c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < EPOCHS; e++) begin
      strike();
      for (int i = 0; i < 1500; i++) begin
        @(posedge clk);
        for (int s = 0; s < N; s++)
          if (txq[s].size() < 2 && ($urandom % 100 < 10)) begin
            d = int'($urandom % (N - 1));
            if (d >= s) d++;
            send(s, d);
          end
      end
      c = 0;
      while (exp_pkt.size() > 0 && c < 5000) begin @(posedge clk); c++; end
      check(exp_pkt.size() == 0, "epoch drained: every packet delivered");
      $display("epoch %0d: faulty routers=%0d faulty buffers=%0d spare demux=%0d outstanding=%0d",
               e, $countones(router_faulty), $countones(fs), $countones(use_spare_demux), exp_pkt.size());
    end
    check(n_faults > 0 && $countones(router_faulty) > 1, "several permanent faults accumulated");
    check(n_redirect > 0, "buffer redirections happened");
    check(n_bad == 0, "no invalid routing bits");
    $display("faults=%0d sent=%0d delivered=%0d reliability=%0d.%03d",
             n_faults, n_sent, n_recv, n_recv / n_sent, (1000 * n_recv / n_sent) % 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
