// recovery_switch_tb: six model buffers filled with packets carrying random
// routing bits. Checks that the select visits 000..101 one per cycle, that each
// head packet leaves on the port its routing bits name when that port is free,
// that invalid routing bits are dropped, and that with the main demultiplexer
// broken packets are lost until the spare demultiplexer is switched in.
module recovery_switch_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [NBUF-1:0] buf_valid, buf_rd;
  packet_t buf_pkt [NBUF];
  logic [NPORT-1:0] out_free, out_load;
  packet_t out_pkt;
  logic use_spare = 0, main_stuck = 0, bad_rbits;
  logic [2:0] sel;
  int checks = 0, failures = 0;
  int delivered = 0, dropped = 0, lost = 0, spare_used = 0;
  packet_t q [NBUF][$];

  recovery_switch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
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

  always_comb begin
    for (int b = 0; b < NBUF; b++) begin
      buf_valid[b] = q[b].size() > 0;
      buf_pkt[b]   = (q[b].size() > 0) ? q[b][0] : '0;
    end
  end

  // reference select: 0..5 and wrap, one step per enabled cycle
  logic [2:0] exp_sel;
  always @(posedge clk)
    if (!rst_n) exp_sel <= 3'd0;
    else if (en) exp_sel <= (exp_sel == 3'd5) ? 3'd0 : exp_sel + 3'd1;

  task automatic run(input int cycles, input int bad_pct);
    packet_t p;
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      for (int b = 0; b < NBUF; b++)
        if (q[b].size() < 4 && $urandom % 2) begin
          p = packet_t'({$urandom, $urandom, $urandom});
          p.rbits = ($urandom % 100 < bad_pct) ? 3'(5 + $urandom % 3) : 3'($urandom % NPORT);
          q[b].push_back(p);
        end
      out_free = NPORT'($urandom | $urandom);
      #1;
      check(sel == exp_sel, "select sequence 000..101");
      if (q[exp_sel].size() > 0) begin
        p = q[exp_sel][0];
        if (p.rbits >= 3'(NPORT)) begin
          check(bad_rbits && buf_rd == (NBUF'(1) << exp_sel) && out_load == '0, "invalid routing bits dropped");
          dropped++;
        end else if (out_free[p.rbits]) begin
          check(buf_rd == (NBUF'(1) << exp_sel), "pop selected buffer");
          if (main_stuck && !use_spare) begin
            check(out_load == '0, "broken main demultiplexer loses the packet");
            lost++;
          end else begin
            check(out_load == (NPORT'(1) << p.rbits), "demultiplexer to routing-bit port");
            check(out_pkt == p, "packet forwarded intact");
            delivered++;
            if (use_spare) spare_used++;
          end
        end else begin
          check(buf_rd == '0 && out_load == '0, "target busy: packet waits");
        end
      end else begin
        check(buf_rd == '0 && out_load == '0, "empty buffer: nothing moves");
      end
      begin
        int cur;
        logic rd;
        cur = int'(exp_sel);
        rd  = |buf_rd;
        @(posedge clk);
        if (rd) void'(q[cur].pop_front());
      end
    end
  endtask

  initial begin
    out_free = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sel == 0, "select starts at Local");
    en = 1;
    run(3000, 5);
    main_stuck = 1;
    run(300, 0);
    use_spare = 1;
    run(3000, 0);
    check(delivered > 0 && dropped > 0 && lost > 0 && spare_used > 0, "all cases exercised");
    $display("delivered=%0d dropped=%0d lost=%0d via spare=%0d", delivered, dropped, lost, spare_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
