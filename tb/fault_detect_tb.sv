// fault_detect_tb: single-cycle fault indications must raise the matching flag
// one clock later and keep it until reset; reset clears all flags.
module fault_detect_tb;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic router_err = 0, demux_err = 0;
  logic [NBUF-1:0] buf_err = '0;
  logic [NBUF-1:0] fs;
  logic router_faulty, use_spare_demux;
  logic [NBUF-1:0] exp_fs;
  logic exp_r, exp_d;
  int checks = 0, failures = 0;

  fault_detect dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      exp_fs = '0; exp_r = 0; exp_d = 0;
      @(negedge clk);
      check(fs == '0 && !router_faulty && !use_spare_demux, "clear after reset");
      for (int i = 0; i < 200; i++) begin
        buf_err    = ($urandom % 8 == 0) ? NBUF'(1) << ($urandom % NBUF) : '0;
        router_err = ($urandom % 40 == 0);
        demux_err  = ($urandom % 40 == 0);
        #1;
        check(fs == exp_fs && router_faulty == exp_r && use_spare_demux == exp_d,
              "no flag before the clock edge");
        exp_fs |= buf_err; exp_r |= router_err; exp_d |= demux_err;
        @(negedge clk);
        check(fs == exp_fs, "flag raised at the clock edge");
        buf_err = '0; router_err = 0; demux_err = 0;
        @(negedge clk);
        check(fs == exp_fs, "fs sticky");
        check(router_faulty == exp_r, "router_faulty sticky");
        check(use_spare_demux == exp_d, "use_spare_demux sticky");
      end
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
