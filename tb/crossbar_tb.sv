// crossbar_tb: random selections; each output must carry the selected buffer's
// packet, and nothing is valid while the crossbar is disabled.
module crossbar_tb;
  import noc_pkg::*;
  logic en;
  packet_t in_pkt [NBUF];
  logic [NPORT-1:0][2:0] sel;
  logic [NPORT-1:0] sel_valid, out_valid;
  packet_t out_pkt [NPORT];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      en = ($urandom % 4 != 0);
      sel_valid = NPORT'($urandom);
      for (int b = 0; b < NBUF; b++) in_pkt[b] = packet_t'({$urandom, $urandom, $urandom});
      for (int o = 0; o < NPORT; o++) sel[o] = 3'($urandom % NBUF);
      #1;
      for (int o = 0; o < NPORT; o++) begin
        checks++;
        if (out_valid[o] != (en && sel_valid[o]) ||
            (out_valid[o] && out_pkt[o] != in_pkt[sel[o]])) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
