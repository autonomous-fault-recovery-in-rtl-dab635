// switch_allocator_tb: random requests against a reference with one
// round-robin pointer per output port; also checks that a disabled crossbar or
// a busy output grants nothing, and that a buffer wins within six tries.
module switch_allocator_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, xbar_en;
  logic [NBUF-1:0] req_valid, buf_rd;
  port_e req_port [NBUF];
  logic [NPORT-1:0] out_free, xsel_valid;
  logic [NPORT-1:0][2:0] xsel;
  int checks = 0, failures = 0;
  int ptr [NPORT];
  int wait_cnt [NBUF];
  int max_wait = 0;

  switch_allocator dut (.*);
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

  initial begin
    logic [NBUF-1:0] exp_rd;
    int pick;
    for (int o = 0; o < NPORT; o++) ptr[o] = 0;
    for (int b = 0; b < NBUF; b++) wait_cnt[b] = 0;
    xbar_en = 1; req_valid = '0; out_free = '1;
    for (int b = 0; b < NBUF; b++) req_port[b] = P_LOCAL;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      xbar_en   = ($urandom % 8 != 0);
      out_free  = NPORT'($urandom | $urandom);
      req_valid = NBUF'($urandom);
      // a hot-spot: most buffers want the same output half of the time
      for (int b = 0; b < NBUF; b++)
        req_port[b] = ($urandom % 2) ? P_EAST : port_e'($urandom % NPORT);
      #1;
      exp_rd = '0;
      for (int o = 0; o < NPORT; o++) begin
        pick = -1;
        if (xbar_en && out_free[o])
          for (int k = 0; k < NBUF; k++) begin
            int b;
            b = (ptr[o] + k) % NBUF;
            if (pick < 0 && req_valid[b] && req_port[b] == port_e'(o)) pick = b;
          end
        check(xsel_valid[o] == (pick >= 0), "grant valid");
        if (pick >= 0) begin
          check(xsel[o] == 3'(pick), "round-robin winner");
          exp_rd[pick] = 1;
          ptr[o] = (pick + 1) % NBUF;
        end
      end
      check(buf_rd == exp_rd, "buffer pops");
      for (int b = 0; b < NBUF; b++) begin
        if (req_valid[b] && xbar_en && out_free[req_port[b]] && !buf_rd[b]) wait_cnt[b]++;
        else wait_cnt[b] = 0;
        if (wait_cnt[b] > max_wait) max_wait = wait_cnt[b];
      end
    end
    check(max_wait > 0 && max_wait < NBUF, "contention seen and no buffer loses six times in a row");
    $display("longest wait=%0d", max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
