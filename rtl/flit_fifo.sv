// flit_fifo: synchronous first-word-fall-through FIFO.
//
// Used as the buffer on every router input port and as the node memory that
// receives packets delivered to a processing element. The head entry is
// always visible on rd_data while empty is low; rd_en pops it at the next
// rising clock edge. A write and a read may happen in the same cycle, also
// when the FIFO is full (the read frees the slot the write takes).
// Writing when full without a read, or reading when empty, is a protocol
// error and is caught by assertions; the FIFO ignores such requests.
// Reset (active high, synchronous) empties the FIFO.
// The input buffers are drawn in the published router diagram; their depth
// is not given, so DEPTH=4 is this design's choice.
module flit_fifo #(
  parameter int WIDTH = noc_pkg::FLIT_W,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;
  logic             do_wr, do_rd;

  assign empty   = (count == 0);
  assign full    = (count == (PTR_W+1)'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  // Handshake rules for the users of the FIFO.
  a_no_overflow: assert property (@(posedge clk) disable iff (reset)
    (wr_en && full) |-> rd_en);
  a_no_underflow: assert property (@(posedge clk) disable iff (reset)
    rd_en |-> !empty);

endmodule
