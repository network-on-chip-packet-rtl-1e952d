// xy_route: dimension-ordered (XY) routing decision of a router.
//
// The packet first travels along X until its column matches, then along Y.
// East is increasing x, north is increasing y (a convention of this design).
// When both coordinates match, the packet leaves through the local port.
// Purely combinational.
module xy_route
  import dhara_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port
);

  always_comb begin
    if      (dst_x > cur_x) out_port = P_EAST;
    else if (dst_x < cur_x) out_port = P_WEST;
    else if (dst_y > cur_y) out_port = P_NORTH;
    else if (dst_y < cur_y) out_port = P_SOUTH;
    else                    out_port = P_LOCAL;
  end

endmodule
