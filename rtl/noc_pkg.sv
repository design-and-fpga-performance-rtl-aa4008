// noc_pkg: types and constants shared by the mesh network-on-chip.
//
// A packet is a single 150-bit flit (bit 149 down to 0):
//   [149]      end bit: marks the end of a transmission
//   [148:146]  layer identification
//   [145:137]  source router address      {X[2:0], Y[2:0], Z[2:0]}
//   [136:128]  destination router address {X[2:0], Y[2:0], Z[2:0]}
//   [127:0]    payload data
// The field positions and widths follow the published packet format.
// Within a 9-bit address X occupies the top three bits and Z the bottom
// three, so the address reads as the three octal digits "XYZ" (router R19
// at X=1, Y=0, Z=2 has address 9'o102); this bit order is this design's
// reading of the "Sxyz" field name.
//
// Router ports are numbered East, West, North, South, Local, Up, Down. A 2D
// router uses the first five, a 3D router all seven. East/West move along
// X, North/South along Y and Up/Down along Z, each first-named direction
// toward larger coordinates (a choice of this design).
package noc_pkg;

  localparam int DATA_W  = 128;
  localparam int COORD_W = 3;
  localparam int ADDR_W  = 3 * COORD_W;
  localparam int LAYER_W = 3;
  localparam int FLIT_W  = 1 + LAYER_W + 2 * ADDR_W + DATA_W;  // 150


  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
    coord_t z;
  } addr_t;

  typedef struct packed {
    logic                 end_bit;
    logic [LAYER_W-1:0]   layer;
    addr_t                src;
    addr_t                dst;
    logic [DATA_W-1:0]    data;
  } flit_t;

  typedef enum logic [2:0] {
    PORT_EAST  = 3'd0,
    PORT_WEST  = 3'd1,
    PORT_NORTH = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_LOCAL = 3'd4,
    PORT_UP    = 3'd5,
    PORT_DOWN  = 3'd6
  } port_e;

  // Number of router ports for a 2D (5) or 3D (7) mesh.
  function automatic int num_ports(input int dim);
    return (dim == 3) ? 7 : 5;
  endfunction

endpackage
