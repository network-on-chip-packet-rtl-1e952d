// tb_xy_route: checks the XY routing decision for every current/destination
// pair of an 8 x 8 grid against a reference (X first, then Y; east and north
// are increasing coordinates).
module tb_xy_route;
  import dhara_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e out_port;
  int checks = 0, failures = 0;

  xy_route dut (.cur_x, .cur_y, .dst_x, .dst_y, .out_port);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 8; cx++) for (int cy = 0; cy < 8; cy++)
    for (int dx = 0; dx < 8; dx++) for (int dy = 0; dy < 8; dy++) begin
      int expv;
      cur_x = 4'(cx); cur_y = 4'(cy); dst_x = 4'(dx); dst_y = 4'(dy);
      #1;
      if (dx > cx)      expv = 0;
      else if (dx < cx) expv = 1;
      else if (dy > cy) expv = 2;
      else if (dy < cy) expv = 3;
      else              expv = 4;
      checks++;
      if (int'(out_port) != expv) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d)->(%0d,%0d): %0d exp %0d", cx, cy, dx, dy, out_port, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
