// heal_rbits_tb: the router-10-sends-to-faulty-router-9 example of a 4x4 mesh
// (router 9 at (1,2)), then every destination and faulty coordinate. The
// expected routing bits are the faulty router's X-first next hop, and nothing
// but the routing bits may change.
module heal_rbits_tb;
  import noc_pkg::*;
  packet_t pkt_in, pkt_out;
  coord_t fx, fy;
  logic stamp;
  logic [2:0] exp;
  int checks = 0, failures = 0;

  heal_rbits dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: dst=(%0d,%0d) f=(%0d,%0d) rbits=%b", what, pkt_in.dst_x, pkt_in.dst_y, fx, fy, pkt_out.rbits);
    end
  endtask

  initial begin
    // Faulty router 9 = (1,2).
    fx = 2'd1; fy = 2'd2; stamp = 1;
    pkt_in = packet_t'({$urandom, $urandom, $urandom});
    pkt_in.dst_x = 1; pkt_in.dst_y = 2; #1; check(pkt_out.rbits == 3'b000, "to router 9: Local");
    pkt_in.dst_x = 0; pkt_in.dst_y = 3; #1; check(pkt_out.rbits == 3'b010, "X lower: West");
    pkt_in.dst_x = 1; pkt_in.dst_y = 3; #1; check(pkt_out.rbits == 3'b011, "Y higher: North");
    pkt_in.dst_x = 1; pkt_in.dst_y = 0; #1; check(pkt_out.rbits == 3'b100, "Y lower: South");
    pkt_in.dst_x = 3; pkt_in.dst_y = 0; #1; check(pkt_out.rbits == 3'b001, "X higher: East");
    for (int a = 0; a < 512; a++) begin
      pkt_in = packet_t'({$urandom, $urandom, $urandom});
      {stamp, pkt_in.dst_x, pkt_in.dst_y, fx, fy} = 9'(a);
      if (!stamp)                 exp = pkt_in.rbits;
      else if (pkt_in.dst_x > fx) exp = 3'b001;
      else if (pkt_in.dst_x < fx) exp = 3'b010;
      else if (pkt_in.dst_y > fy) exp = 3'b011;
      else if (pkt_in.dst_y < fy) exp = 3'b100;
      else                        exp = 3'b000;
      #1;
      check(pkt_out.rbits == exp, "routing bits");
      check(pkt_out[$bits(packet_t)-1:3] == pkt_in[$bits(packet_t)-1:3], "other fields unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
