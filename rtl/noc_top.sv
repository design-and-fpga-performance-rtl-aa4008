// noc_top: the two mesh networks-on-chip side by side, a 3 x 3 2D mesh of
// 5-port routers (XY routing) and a 3 x 3 x 3 3D mesh of 7-port routers
// (XYZ routing).
//
// The two networks share only clock and reset. Each has its own host port
// with the pin list of noc_mesh, prefixed m2_ for the 2D mesh and m3_ for
// the 3D mesh: write a one-flit packet into the source node named by
// source_xyz, read delivered packets out of the node memory of the node
// named by destination_xyz, and watch fifo_full / fifo_empty. Addresses are
// {X,Y,Z} with three bits each; in the 2D mesh Z is 0.
// Both mesh sizes and router port counts follow the published design; the
// buffer depths (FIFO_DEPTH, NODE_DEPTH) are this design's choice.
module noc_top #(
  parameter int FIFO_DEPTH = 4,
  parameter int NODE_DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        reset,
  // 2D mesh (3 x 3)
  input  logic [noc_pkg::LAYER_W-1:0] m2_layer_address,
  input  logic [noc_pkg::ADDR_W-1:0]  m2_source_xyz,
  input  logic [noc_pkg::ADDR_W-1:0]  m2_destination_xyz,
  input  logic [noc_pkg::DATA_W-1:0]  m2_packet_data,
  input  logic                        m2_write,
  input  logic                        m2_read,
  output logic [noc_pkg::DATA_W-1:0]  m2_packet_out,
  output logic                        m2_end_bit,
  output logic                        m2_fifo_full,
  output logic                        m2_fifo_empty,
  // 3D mesh (3 x 3 x 3)
  input  logic [noc_pkg::LAYER_W-1:0] m3_layer_address,
  input  logic [noc_pkg::ADDR_W-1:0]  m3_source_xyz,
  input  logic [noc_pkg::ADDR_W-1:0]  m3_destination_xyz,
  input  logic [noc_pkg::DATA_W-1:0]  m3_packet_data,
  input  logic                        m3_write,
  input  logic                        m3_read,
  output logic [noc_pkg::DATA_W-1:0]  m3_packet_out,
  output logic                        m3_end_bit,
  output logic                        m3_fifo_full,
  output logic                        m3_fifo_empty
);

  noc_mesh #(
    .DIM(2), .XN(3), .YN(3), .ZN(1),
    .FIFO_DEPTH(FIFO_DEPTH), .NODE_DEPTH(NODE_DEPTH)
  ) u_mesh_2d (
    .clk             (clk),
    .reset           (reset),
    .layer_address   (m2_layer_address),
    .source_xyz      (m2_source_xyz),
    .destination_xyz (m2_destination_xyz),
    .packet_data     (m2_packet_data),
    .write           (m2_write),
    .read            (m2_read),
    .packet_out      (m2_packet_out),
    .end_bit         (m2_end_bit),
    .fifo_full       (m2_fifo_full),
    .fifo_empty      (m2_fifo_empty)
  );

  noc_mesh #(
    .DIM(3), .XN(3), .YN(3), .ZN(3),
    .FIFO_DEPTH(FIFO_DEPTH), .NODE_DEPTH(NODE_DEPTH)
  ) u_mesh_3d (
    .clk             (clk),
    .reset           (reset),
    .layer_address   (m3_layer_address),
    .source_xyz      (m3_source_xyz),
    .destination_xyz (m3_destination_xyz),
    .packet_data     (m3_packet_data),
    .write           (m3_write),
    .read            (m3_read),
    .packet_out      (m3_packet_out),
    .end_bit         (m3_end_bit),
    .fifo_full       (m3_fifo_full),
    .fifo_empty      (m3_fifo_empty)
  );

endmodule
