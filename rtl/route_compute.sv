// route_compute: dimension-ordered routing decision of one router input.
//
// Compares the destination address of a flit with the router's own address
// and names the output port the flit must leave by. In a 2D mesh (DIM=2) it
// applies XY routing: it corrects X first (East/West), then Y (North/South),
// and delivers to the Local port when both match. In a 3D mesh (DIM=3) it
// applies XYZ routing and corrects Z last (Up/Down). The XY and XYZ orders
// follow the published design; the mapping of directions to coordinate
// signs is this design's choice (East, North, Up toward larger coordinates).
// In a 2D mesh the Z field is not examined.
// Purely combinational: the decision is valid in the same cycle as the
// address.
module route_compute #(
  parameter int DIM = 3
) (
  input  noc_pkg::addr_t my_addr,
  input  noc_pkg::addr_t dst_addr,
  output noc_pkg::port_e out_port
);
  import noc_pkg::*;

  always_comb begin
    if (dst_addr.x > my_addr.x)                 out_port = PORT_EAST;
    else if (dst_addr.x < my_addr.x)            out_port = PORT_WEST;
    else if (dst_addr.y > my_addr.y)            out_port = PORT_NORTH;
    else if (dst_addr.y < my_addr.y)            out_port = PORT_SOUTH;
    else if (DIM == 3 && dst_addr.z > my_addr.z) out_port = PORT_UP;
    else if (DIM == 3 && dst_addr.z < my_addr.z) out_port = PORT_DOWN;
    else                                         out_port = PORT_LOCAL;
  end

endmodule
