// fifo_controller_tb: the buffer-repair example of the design (East buffer
// faulty, North buffer the most available: the East packet is stored in the
// North buffer), then random fault patterns, grants, free-slot counts and
// arrivals checked against a reference written as "largest free-slot count,
// ties to the highest index".
module fifo_controller_tb;
  import noc_pkg::*;

  localparam int unsigned CNT_W = 3;

  logic [NPORT-1:0] in_valid, in_ready, redirected;
  packet_t in_pkt [NPORT];
  logic [NBUF-1:0] fs, gnt, buf_wr_en;
  logic [NBUF-1:0][CNT_W-1:0] fsc;
  packet_t buf_wr_pkt [NBUF];
  logic router_full;
  int checks = 0, failures = 0;
  int n_redirect = 0, n_full = 0;

  fifo_controller #(.CNT_W(CNT_W)) dut (.*);

  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
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
  task automatic compare();
    logic [NBUF-1:0] taken;
    logic [NBUF-1:0] exp_wr;
    logic [NPORT-1:0] exp_rdy, exp_red;
    int src [NBUF];
    int maxv, pick;
    taken = '0; exp_wr = '0; exp_rdy = '0; exp_red = '0;
    for (int b = 0; b < NBUF; b++) src[b] = -1;
    for (int p = 0; p < NPORT; p++)
      if (!fs[p] && in_valid[p] && gnt[p]) begin
        taken[p] = 1; exp_wr[p] = 1; exp_rdy[p] = 1; src[p] = p;
      end
    for (int p = 0; p < NPORT; p++)
      if (fs[p] && in_valid[p]) begin
        maxv = -1; pick = -1;
        for (int b = 0; b < NBUF; b++)
          if (!fs[b] && gnt[b] && !taken[b] && int'(fsc[b]) > maxv) maxv = int'(fsc[b]);
        for (int b = 0; b < NBUF; b++)
          if (!fs[b] && gnt[b] && !taken[b] && int'(fsc[b]) == maxv) pick = b;
        if (pick >= 0) begin
          taken[pick] = 1; exp_wr[pick] = 1; exp_rdy[p] = 1; exp_red[p] = 1; src[pick] = p;
        end
      end
    #1;
    check(in_ready == exp_rdy, "in_ready");
    check(buf_wr_en == exp_wr, "buf_wr_en");
    check(redirected == exp_red, "redirected");
    check(router_full == ((gnt & ~fs) == '0), "router_full");
    for (int b = 0; b < NBUF; b++)
      if (exp_wr[b]) check(buf_wr_pkt[b] == in_pkt[src[b]], "buffer write data");
    n_redirect += $countones(exp_red);
    if (router_full) n_full++;
  endtask

  initial begin
    for (int p = 0; p < NPORT; p++) in_pkt[p] = packet_t'({$urandom, $urandom, $urandom});
    // Worked example: East buffer faulty, North buffer most available.
    fs = '0; fs[P_EAST] = 1;
    gnt = '1;
    fsc = '0;
    fsc[P_LOCAL] = 1; fsc[P_EAST] = 4; fsc[P_WEST] = 2; fsc[P_NORTH] = 4; fsc[P_SOUTH] = 3; fsc[P_SPARE] = 1;
    in_valid = '0; in_valid[P_EAST] = 1;
    #1;
    check(buf_wr_en == (NBUF'(1) << P_NORTH), "East packet goes to North buffer");
    check(buf_wr_pkt[P_NORTH] == in_pkt[P_EAST], "North buffer receives Pkt_E");
    check(in_ready[P_EAST] && redirected[P_EAST], "East accepted by redirection");
    // All healthy buffers full -> router full, faulty port held back.
    gnt = '0; gnt[P_EAST] = 1;
    #1;
    check(router_full && !in_ready[P_EAST], "router full holds East");
    // Random
    for (int i = 0; i < 20000; i++) begin
      fs = NBUF'(($urandom % 4 == 0) ? $urandom : ($urandom & $urandom & $urandom));
      for (int b = 0; b < NBUF; b++) begin
        fsc[b] = CNT_W'($urandom % 5);
        gnt[b] = (fsc[b] != 0);
      end
      in_valid = NPORT'($urandom);
      for (int p = 0; p < NPORT; p++) in_pkt[p] = packet_t'({$urandom, $urandom, $urandom});
      compare();
      #4;
    end
    check(n_redirect > 0 && n_full > 0, "redirections and full router both seen");
    $display("redirections=%0d full=%0d", n_redirect, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
