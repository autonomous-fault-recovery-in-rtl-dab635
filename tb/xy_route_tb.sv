// xy_route_tb: every router and destination coordinate of a 4x4 mesh against
// the X-first rule.
module xy_route_tb;
  import noc_pkg::*;
  coord_t cur_x, cur_y, dst_x, dst_y;
  port_e out_port, exp_port;
  int checks = 0, failures = 0;

  xy_route dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      {cur_x, cur_y, dst_x, dst_y} = 8'(a);
      if (dst_x != cur_x) exp_port = (int'(dst_x) - int'(cur_x) > 0) ? P_EAST : P_WEST;
      else if (dst_y != cur_y) exp_port = (int'(dst_y) - int'(cur_y) > 0) ? P_NORTH : P_SOUTH;
      else exp_port = P_LOCAL;
      #1;
      checks++;
      if (out_port != exp_port) begin
        failures++;
        $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) got %0d exp %0d", cur_x, cur_y, dst_x, dst_y, out_port, exp_port);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
