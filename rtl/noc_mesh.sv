// noc_mesh: a cluster of routers in a 2D (XN x YN) or 3D (XN x YN x ZN) mesh
// with a host port that writes packets into nodes and reads them back out.
//
// Router n sits at (x, y, z) with n = x + XN*(y + YN*z), so in a 3 x 3 mesh
// R0 is (0,0), R1 (1,0), ..., R8 (2,2), and in a 3 x 3 x 3 mesh R9 is
// (0,0,1) and R26 (2,2,2). Neighbouring routers are joined by a link in each
// direction: East of one to West of the next along X, North/South along Y,
// Up/Down along Z. Ports on the mesh boundary are unconnected: nothing
// enters them and what leaves them is dropped (dimension-ordered routing
// never sends there a packet whose destination lies inside the mesh).
//
// Every node has a processing-element side. Its injection path is the
// router's Local input FIFO; its node memory is a FIFO (NODE_DEPTH deep)
// that takes the packets delivered by the router's Local output.
//
// Host port (the published pin list of the mesh): write, with
// source_xyz, destination_xyz, layer_address and packet_data, builds a
// one-flit packet (end bit set) and writes it into the Local input of the
// source router, if that router exists and its FIFO is not full; fifo_full
// shows that FIFO's state for the node named by source_xyz (and is high
// when no such node exists). read pops the node memory of the node named by
// destination_xyz; the popped payload and end bit appear on packet_out and
// end_bit after the next rising edge and stay there until the next read.
// fifo_empty shows that node memory's state (high when no such node exists).
// Addresses are {X,Y,Z}, three bits each. Reset is active high, synchronous.
// Latency: a packet written at edge k reaches the destination's node memory
// at edge k + 2*(hops+1) in an idle network, hops being the number of links
// crossed. In 2D (DIM=2) the Z field of addresses must be 0.
// The mesh sizes, routing, packet format and pin list follow the published
// design; the node memory depth and the host-port timing are this design's.
module noc_mesh #(
  parameter int DIM        = 3,
  parameter int XN         = 3,
  parameter int YN         = 3,
  parameter int ZN         = 3,
  parameter int FIFO_DEPTH = 4,
  parameter int NODE_DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        reset,
  input  logic [noc_pkg::LAYER_W-1:0] layer_address,
  input  logic [noc_pkg::ADDR_W-1:0]  source_xyz,
  input  logic [noc_pkg::ADDR_W-1:0]  destination_xyz,
  input  logic [noc_pkg::DATA_W-1:0]  packet_data,
  input  logic                        write,
  input  logic                        read,
  output logic [noc_pkg::DATA_W-1:0]  packet_out,
  output logic                        end_bit,
  output logic                        fifo_full,
  output logic                        fifo_empty
);
  import noc_pkg::*;

  localparam int NP = num_ports(DIM);
  localparam int NN = XN * YN * ZN;
  localparam int IDX_W = (NN > 1) ? $clog2(NN) : 1;

  if (DIM != 2 && DIM != 3) begin : g_bad_dim
    $error("noc_mesh: DIM must be 2 or 3");
  end
  if (DIM == 2 && ZN != 1) begin : g_bad_z
    $error("noc_mesh: a 2D mesh needs ZN = 1");
  end

  logic  r_in_valid  [NN][NP];
  logic  r_in_ready  [NN][NP];
  flit_t r_in_flit   [NN][NP];
  logic  r_out_valid [NN][NP];
  logic  r_out_ready [NN][NP];
  flit_t r_out_flit  [NN][NP];

  logic  node_full  [NN];
  logic  node_empty [NN];
  flit_t node_head  [NN];
  logic  node_rd    [NN];

  // ---- host address decode ----
  addr_t src_a, dst_a;
  logic  src_ok, dst_ok;
  logic [IDX_W-1:0] src_idx, dst_idx;
  flit_t inj_flit;

  assign src_a = addr_t'(source_xyz);
  assign dst_a = addr_t'(destination_xyz);

  function automatic logic in_mesh(input addr_t a);
    return (int'(a.x) < XN) && (int'(a.y) < YN) && (int'(a.z) < ZN);
  endfunction

  function automatic logic [IDX_W-1:0] node_index(input addr_t a);
    return IDX_W'(int'(a.x) + XN * (int'(a.y) + YN * int'(a.z)));
  endfunction

  assign src_ok  = in_mesh(src_a);
  assign dst_ok  = in_mesh(dst_a);
  assign src_idx = src_ok ? node_index(src_a) : '0;
  assign dst_idx = dst_ok ? node_index(dst_a) : '0;

  always_comb begin
    inj_flit.end_bit = 1'b1;
    inj_flit.layer   = layer_address;
    inj_flit.src     = src_a;
    inj_flit.dst     = dst_a;
    inj_flit.data    = packet_data;
  end

  assign fifo_full  = src_ok ? !r_in_ready[src_idx][PORT_LOCAL] : 1'b1;
  assign fifo_empty = dst_ok ? node_empty[dst_idx] : 1'b1;

  // ---- routers, links and node memories ----
  for (genvar z = 0; z < ZN; z++) begin : g_z
    for (genvar y = 0; y < YN; y++) begin : g_y
      for (genvar x = 0; x < XN; x++) begin : g_x
        localparam int N = x + XN * (y + YN * z);

        noc_router #(.DIM(DIM), .X(x), .Y(y), .Z(z), .FIFO_DEPTH(FIFO_DEPTH)) u_router (
          .clk       (clk),
          .reset     (reset),
          .in_valid  (r_in_valid[N]),
          .in_ready  (r_in_ready[N]),
          .in_flit   (r_in_flit[N]),
          .out_valid (r_out_valid[N]),
          .out_ready (r_out_ready[N]),
          .out_flit  (r_out_flit[N])
        );

        // East output -> West input of (x+1); West output -> East input of (x-1)
        if (x < XN - 1) begin : g_e
          assign r_in_valid[N][PORT_EAST]  = r_out_valid[N+1][PORT_WEST];
          assign r_in_flit[N][PORT_EAST]   = r_out_flit[N+1][PORT_WEST];
          assign r_out_ready[N][PORT_EAST] = r_in_ready[N+1][PORT_WEST];
        end else begin : g_e_edge
          assign r_in_valid[N][PORT_EAST]  = 1'b0;
          assign r_in_flit[N][PORT_EAST]   = '0;
          assign r_out_ready[N][PORT_EAST] = 1'b1;
        end
        if (x > 0) begin : g_w
          assign r_in_valid[N][PORT_WEST]  = r_out_valid[N-1][PORT_EAST];
          assign r_in_flit[N][PORT_WEST]   = r_out_flit[N-1][PORT_EAST];
          assign r_out_ready[N][PORT_WEST] = r_in_ready[N-1][PORT_EAST];
        end else begin : g_w_edge
          assign r_in_valid[N][PORT_WEST]  = 1'b0;
          assign r_in_flit[N][PORT_WEST]   = '0;
          assign r_out_ready[N][PORT_WEST] = 1'b1;
        end
        if (y < YN - 1) begin : g_n
          assign r_in_valid[N][PORT_NORTH]  = r_out_valid[N+XN][PORT_SOUTH];
          assign r_in_flit[N][PORT_NORTH]   = r_out_flit[N+XN][PORT_SOUTH];
          assign r_out_ready[N][PORT_NORTH] = r_in_ready[N+XN][PORT_SOUTH];
        end else begin : g_n_edge
          assign r_in_valid[N][PORT_NORTH]  = 1'b0;
          assign r_in_flit[N][PORT_NORTH]   = '0;
          assign r_out_ready[N][PORT_NORTH] = 1'b1;
        end
        if (y > 0) begin : g_s
          assign r_in_valid[N][PORT_SOUTH]  = r_out_valid[N-XN][PORT_NORTH];
          assign r_in_flit[N][PORT_SOUTH]   = r_out_flit[N-XN][PORT_NORTH];
          assign r_out_ready[N][PORT_SOUTH] = r_in_ready[N-XN][PORT_NORTH];
        end else begin : g_s_edge
          assign r_in_valid[N][PORT_SOUTH]  = 1'b0;
          assign r_in_flit[N][PORT_SOUTH]   = '0;
          assign r_out_ready[N][PORT_SOUTH] = 1'b1;
        end
        if (DIM == 3) begin : g_3d
          if (z < ZN - 1) begin : g_u
            assign r_in_valid[N][PORT_UP]  = r_out_valid[N+XN*YN][PORT_DOWN];
            assign r_in_flit[N][PORT_UP]   = r_out_flit[N+XN*YN][PORT_DOWN];
            assign r_out_ready[N][PORT_UP] = r_in_ready[N+XN*YN][PORT_DOWN];
          end else begin : g_u_edge
            assign r_in_valid[N][PORT_UP]  = 1'b0;
            assign r_in_flit[N][PORT_UP]   = '0;
            assign r_out_ready[N][PORT_UP] = 1'b1;
          end
          if (z > 0) begin : g_d
            assign r_in_valid[N][PORT_DOWN]  = r_out_valid[N-XN*YN][PORT_UP];
            assign r_in_flit[N][PORT_DOWN]   = r_out_flit[N-XN*YN][PORT_UP];
            assign r_out_ready[N][PORT_DOWN] = r_in_ready[N-XN*YN][PORT_UP];
          end else begin : g_d_edge
            assign r_in_valid[N][PORT_DOWN]  = 1'b0;
            assign r_in_flit[N][PORT_DOWN]   = '0;
            assign r_out_ready[N][PORT_DOWN] = 1'b1;
          end
        end

        // Processing-element side: injection into the Local input FIFO,
        // delivery into the node memory.
        assign r_in_valid[N][PORT_LOCAL]  = write && src_ok && (src_idx == IDX_W'(N));
        assign r_in_flit[N][PORT_LOCAL]   = inj_flit;
        assign r_out_ready[N][PORT_LOCAL] = !node_full[N];
        assign node_rd[N] = read && dst_ok && (dst_idx == IDX_W'(N)) && !node_empty[N];

        flit_fifo #(.WIDTH(FLIT_W), .DEPTH(NODE_DEPTH)) u_node_mem (
          .clk     (clk),
          .reset   (reset),
          .wr_en   (r_out_valid[N][PORT_LOCAL] && !node_full[N]),
          .wr_data (r_out_flit[N][PORT_LOCAL]),
          .full    (node_full[N]),
          .rd_en   (node_rd[N]),
          .rd_data (node_head[N]),
          .empty   (node_empty[N])
        );
      end
    end
  end

  // ---- host read data ----
  always_ff @(posedge clk) begin
    if (reset) begin
      packet_out <= '0;
      end_bit    <= 1'b0;
    end else if (read && dst_ok && !node_empty[dst_idx]) begin
      packet_out <= node_head[dst_idx].data;
      end_bit    <= node_head[dst_idx].end_bit;
    end
  end

endmodule
