// noc_router: input-buffered mesh router, 5 ports in 2D, 7 ports in 3D.
//
// Ports (index order): East, West, North, South, Local, and in 3D Up, Down.
// Every input port has a flit FIFO. The control logic of each input reads
// the destination of its head flit and picks an output port by XY (2D) or
// XYZ (3D) dimension-ordered routing. Each output port has a round-robin
// arbiter that picks one of the inputs asking for it, provided the output's
// register can take a flit; the crossbar then copies the winning head flit
// into that output register and the input FIFO pops it. Output registers
// hand flits to the neighbour with a valid-ready handshake.
//
// Interface: per port, in_valid/in_ready/in_flit (a flit enters the input
// FIFO at a rising edge where in_valid and in_ready are high; in_ready is
// "FIFO not full") and out_valid/out_ready/out_flit (same rule, driven by
// the output register). The router's own address is set by the parameters
// X, Y, Z.
// Timing: a flit written into an input FIFO at edge k is in the output
// register after edge k+1 when the output is free, so with an idle network
// each router adds two clock cycles. One flit per output per cycle.
// Port counts, routing orders, input buffers, per-input control logic,
// crossbar and output registers follow the published router; FIFO depth,
// arbitration policy and the handshake are this design's choices.
module noc_router #(
  parameter int DIM        = 3,
  parameter int X          = 0,
  parameter int Y          = 0,
  parameter int Z          = 0,
  parameter int FIFO_DEPTH = 4,
  localparam int NP        = noc_pkg::num_ports(DIM)
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           in_valid  [NP],
  output logic           in_ready  [NP],
  input  noc_pkg::flit_t in_flit   [NP],
  output logic           out_valid [NP],
  input  logic           out_ready [NP],
  output noc_pkg::flit_t out_flit  [NP]
);
  import noc_pkg::*;

  localparam int SEL_W = $clog2(NP);

  localparam addr_t MY_ADDR = '{x: coord_t'(X), y: coord_t'(Y), z: coord_t'(Z)};

  flit_t          head      [NP];
  logic           fifo_empty[NP];
  logic           fifo_full [NP];
  logic           pop       [NP];
  port_e          route     [NP];

  logic [NP-1:0]  req       [NP];   // req[o][i]: input i wants output o
  logic [NP-1:0]  grant     [NP];   // grant[o][i]
  logic [NP-1:0]  xb_en;
  logic [SEL_W-1:0] xb_sel  [NP];
  flit_t          xb_out    [NP];
  logic [NP-1:0]  xb_valid;
  logic           out_free  [NP];

  for (genvar i = 0; i < NP; i++) begin : g_in
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .reset   (reset),
      .wr_en   (in_valid[i] && !fifo_full[i]),
      .wr_data (in_flit[i]),
      .full    (fifo_full[i]),
      .rd_en   (pop[i]),
      .rd_data (head[i]),
      .empty   (fifo_empty[i])
    );
    assign in_ready[i] = !fifo_full[i];

    route_compute #(.DIM(DIM)) u_route (
      .my_addr  (MY_ADDR),
      .dst_addr (head[i].dst),
      .out_port (route[i])
    );
  end

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NP; i++)
        req[o][i] = !fifo_empty[i] && (int'(route[i]) == o);
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    logic [NP-1:0] arb_grant;

    rr_arbiter #(.N(NP)) u_arb (
      .clk     (clk),
      .reset   (reset),
      .req     (req[o]),
      .advance (out_free[o]),
      .grant   (arb_grant)
    );
    assign grant[o] = out_free[o] ? arb_grant : '0;
    assign xb_en[o] = |grant[o];

    always_comb begin
      xb_sel[o] = '0;
      for (int i = 0; i < NP; i++)
        if (arb_grant[i]) xb_sel[o] = SEL_W'(i);
    end

    output_register u_oreg (
      .clk       (clk),
      .reset     (reset),
      .load      (xb_valid[o]),
      .din       (xb_out[o]),
      .free      (out_free[o]),
      .out_valid (out_valid[o]),
      .out_flit  (out_flit[o]),
      .out_ready (out_ready[o])
    );
  end

  crossbar #(.N(NP)) u_xbar (
    .in_flit   (head),
    .sel       (xb_sel),
    .en        (xb_en),
    .out_flit  (xb_out),
    .out_valid (xb_valid)
  );

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      pop[i] = 1'b0;
      for (int o = 0; o < NP; o++)
        if (grant[o][i]) pop[i] = 1'b1;
    end
  end

endmodule
