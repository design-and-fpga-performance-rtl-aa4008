// rr_arbiter: round-robin arbiter for one router output port.
//
// Grants at most one of N requesters (one-hot grant, combinational from req).
// Priority rotates: after a granted cycle (grant non-zero and advance high)
// the requester just served gets the lowest priority, so every steadily
// requesting input is served within N grants. When advance is low the grant
// is still shown but the priority pointer holds; the router drives advance
// with "output register can take a flit", and masks the grant with it.
// The published design names per-port control logic but not how conflicting
// inputs are ordered; round-robin is this design's choice.
module rr_arbiter #(
  parameter int N = 7
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int IDX_W = (N > 1) ? $clog2(N) : 1;

  logic [IDX_W-1:0] ptr;      // requester with the highest priority
  logic [IDX_W-1:0] win;

  always_comb begin
    logic [IDX_W-1:0] idx;
    grant = '0;
    win   = ptr;
    for (int i = N - 1; i >= 0; i--) begin
      idx = IDX_W'((int'(ptr) + i) % N);
      if (req[idx]) begin
        grant = '0;
        grant[idx] = 1'b1;
        win = idx;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      ptr <= '0;
    end else if (advance && (|req)) begin
      ptr <= (win == IDX_W'(N - 1)) ? '0 : win + 1'b1;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (reset) $onehot0(grant));

endmodule
