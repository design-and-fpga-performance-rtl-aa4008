// crossbar: N x N flit switch of a router (5 x 5 in 2D, 7 x 7 in 3D).
//
// Each output o forwards the flit of the input named by sel[o]; out_valid[o]
// is high when that output was given an input (en[o]). Any permutation, and
// one input driving several outputs, can be set up in the same cycle; the
// arbiters make sure each input is granted to at most one output.
// Purely combinational. The port counts follow the published design; the
// multiplexer form is this design's choice.
module crossbar #(
  parameter int N = 7
) (
  input  noc_pkg::flit_t               in_flit  [N],
  input  logic [$clog2(N)-1:0]         sel      [N],
  input  logic [N-1:0]                 en,
  output noc_pkg::flit_t               out_flit [N],
  output logic [N-1:0]                 out_valid
);

  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_flit[o]  = in_flit[sel[o]];
      out_valid[o] = en[o];
    end
  end

endmodule
