// tb_noc_mesh: drives a 3x3x3 3D mesh (noc_mesh defaults) and a 3x3 2D mesh
// through their host ports with mesh_driver, and counts output contention
// inside the routers of both meshes.
module tb_noc_mesh;
  import noc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst3, rst2;
  logic [2:0] la3, la2;
  logic [8:0] s3, d3, s2, d2;
  logic [127:0] pd3, pd2, po3, po2;
  logic w3, r3, w2, r2, eb3, eb2, ff3, ff2, fe3, fe2;
  int c3, f3, c2, f2;
  bit dn3, dn2;

  noc_mesh u_mesh3 (
    .clk(clk), .reset(rst3), .layer_address(la3), .source_xyz(s3), .destination_xyz(d3),
    .packet_data(pd3), .write(w3), .read(r3), .packet_out(po3), .end_bit(eb3),
    .fifo_full(ff3), .fifo_empty(fe3));
  mesh_driver #(.DIM(3), .XN(3), .YN(3), .ZN(3)) drv3 (
    .clk(clk), .reset(rst3), .layer_address(la3), .source_xyz(s3), .destination_xyz(d3),
    .packet_data(pd3), .write(w3), .read(r3), .packet_out(po3), .end_bit(eb3),
    .fifo_full(ff3), .fifo_empty(fe3), .checks(c3), .failures(f3), .done(dn3));

  noc_mesh #(.DIM(2), .XN(3), .YN(3), .ZN(1)) u_mesh2 (
    .clk(clk), .reset(rst2), .layer_address(la2), .source_xyz(s2), .destination_xyz(d2),
    .packet_data(pd2), .write(w2), .read(r2), .packet_out(po2), .end_bit(eb2),
    .fifo_full(ff2), .fifo_empty(fe2));
  mesh_driver #(.DIM(2), .XN(3), .YN(3), .ZN(1)) drv2 (
    .clk(clk), .reset(rst2), .layer_address(la2), .source_xyz(s2), .destination_xyz(d2),
    .packet_data(pd2), .write(w2), .read(r2), .packet_out(po2), .end_bit(eb2),
    .fifo_full(ff2), .fifo_empty(fe2), .checks(c2), .failures(f2), .done(dn2));

  // Output contention: cycles in which two or more inputs of one router ask
  // for the same output.
  int contention3 = 0, contention2 = 0;
  for (genvar n = 0; n < 27; n++) begin : g_c3
    always @(posedge clk)
      for (int o = 0; o < 7; o++)
        if ($countones(u_mesh3.g_z[n / 9].g_y[(n / 3) % 3].g_x[n % 3].u_router.req[o]) > 1)
          contention3++;
  end
  for (genvar n = 0; n < 9; n++) begin : g_c2
    always @(posedge clk)
      for (int o = 0; o < 5; o++)
        if ($countones(u_mesh2.g_z[0].g_y[n / 3].g_x[n % 3].u_router.req[o]) > 1)
          contention2++;
  end

  initial begin
    fork
      begin
        wait (dn3 && dn2);
        $display("contention cycles: 3D %0d, 2D %0d", contention3, contention2);
        $display("TB_RESULT checks=%0d failures=%0d", c3 + c2 + 2,
                 f3 + f2 + (contention3 == 0) + (contention2 == 0));
      end
      begin
        repeat (2000000) @(posedge clk);
        $display("FAIL watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", c3 + c2, f3 + f2 + 1);
      end
    join_any
    $finish;
  end
endmodule
