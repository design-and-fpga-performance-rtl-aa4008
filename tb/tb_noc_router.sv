// tb_noc_router: runs random traffic through a 7-port 3D router at the
// centre of a 3x3x3 mesh, a 3D router on a corner, and a 5-port 2D router,
// each checked by router_harness.
module tb_noc_router;
  logic clk = 0;
  int c3, f3, c3c, f3c, c2, f2;
  bit d3, d3c, d2;

  always #5 clk = ~clk;

  router_harness #(.DIM(3), .X(1), .Y(1), .Z(1)) h3  (.clk(clk), .checks(c3),  .failures(f3),  .done(d3));
  router_harness #(.DIM(3), .X(0), .Y(2), .Z(0)) h3c (.clk(clk), .checks(c3c), .failures(f3c), .done(d3c));
  router_harness #(.DIM(2), .X(1), .Y(1), .Z(0)) h2  (.clk(clk), .checks(c2),  .failures(f2),  .done(d2));

  initial begin
    fork
      begin
        wait (d3 && d3c && d2);
        $display("TB_RESULT checks=%0d failures=%0d", c3 + c3c + c2, f3 + f3c + f2);
      end
      begin
        repeat (200000) @(posedge clk);
        $display("FAIL watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", c3 + c3c + c2, f3 + f3c + f2 + 1);
      end
    join_any
    $finish;
  end
endmodule
