// output_register: the directional register on one router output port.
//
// Holds one flit for the neighbouring router (or the local node) until that
// side takes it. out_valid/out_ready form a valid-ready handshake: a flit
// moves at a rising edge where both are high. free tells the router the
// register can be loaded this cycle: it is empty, or its flit leaves now, so
// a new flit can follow every cycle. load must only be raised while free.
// Reset (active high, synchronous) empties the register.
// The register itself appears in the published router diagram; the
// handshake is this design's choice.
module output_register (
  input  logic           clk,
  input  logic           reset,
  input  logic           load,
  input  noc_pkg::flit_t din,
  output logic           free,
  output logic           out_valid,
  output noc_pkg::flit_t out_flit,
  input  logic           out_ready
);

  assign free = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
    end else if (load) begin
      out_valid <= 1'b1;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (load) out_flit <= din;
  end

  a_load_when_free: assert property (@(posedge clk) disable iff (reset) load |-> free);

endmodule
