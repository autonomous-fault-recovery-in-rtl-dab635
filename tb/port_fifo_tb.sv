// port_fifo_tb: random pushes and pops against a queue reference model.
// Every cycle checks the head packet, the valid flag, the Free Slots Counter
// and the grant, and that a packet written is readable one cycle later.
module port_fifo_tb;
  import noc_pkg::*;

  localparam int unsigned DEPTH = 4;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  packet_t wr_pkt, rd_pkt;
  logic rd_valid, gnt;
  logic [CNT_W-1:0] fsc;
  int checks = 0, failures = 0;

  port_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  packet_t q[$];
  int fills = 0;

  initial begin
    wr_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(fsc == CNT_W'(DEPTH) && gnt && !rd_valid, "empty after reset");
    // fill to full, check gnt drops
    for (int i = 0; i < DEPTH; i++) begin
      wr_en = 1; wr_pkt = packet_t'({$urandom, $urandom, $urandom});
      q.push_back(wr_pkt);
      @(negedge clk);
      check(rd_valid, "valid one cycle after write");
    end
    wr_en = 0;
    check(fsc == 0 && !gnt, "full: fsc 0 and gnt low");
    // random traffic
    for (int cyc = 0; cyc < 3000; cyc++) begin
      wr_en  = ($urandom % 3 != 0) && (q.size() < DEPTH);
      rd_en  = ($urandom % 2 == 0) && (q.size() > 0);
      wr_pkt = packet_t'({$urandom, $urandom, $urandom});
      if (q.size() > 0) check(rd_pkt == q[0], "head packet");
      check(rd_valid == (q.size() > 0), "rd_valid");
      check(fsc == CNT_W'(DEPTH - q.size()), "free slots counter");
      check(gnt == (q.size() < DEPTH), "grant");
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_pkt);
      if (q.size() == DEPTH) fills++;
      @(negedge clk);
    end
    check(fills > 0, "buffer became full during random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
