// tb_noc_top: end-to-end test of noc_top at its default parameters. The 3x3
// 2D mesh and the 3x3x3 3D mesh are each driven through their own host port
// by mesh_driver (published transfer scenarios with latency checks,
// refused out-of-mesh addresses, a hot spot that fills a source FIFO, and
// random traffic with in-order, exactly-once delivery checks). It also
// counts, inside the routers, cycles with output contention and cycles in
// which a node memory was full and held back a router's Local output; each
// must happen at least once in each mesh.
module tb_noc_top;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst2, rst3;
  logic [2:0] la2, la3;
  logic [8:0] s2, d2, s3, d3;
  logic [127:0] pd2, pd3, po2, po3;
  logic w2, r2, w3, r3, eb2, eb3, ff2, ff3, fe2, fe3;
  int c2, f2, c3, f3;
  bit dn2, dn3;

  // Both drivers release reset together; the 3D driver's reset is used.
  noc_top dut (
    .clk(clk), .reset(rst3 | rst2),
    .m2_layer_address(la2), .m2_source_xyz(s2), .m2_destination_xyz(d2),
    .m2_packet_data(pd2), .m2_write(w2), .m2_read(r2), .m2_packet_out(po2),
    .m2_end_bit(eb2), .m2_fifo_full(ff2), .m2_fifo_empty(fe2),
    .m3_layer_address(la3), .m3_source_xyz(s3), .m3_destination_xyz(d3),
    .m3_packet_data(pd3), .m3_write(w3), .m3_read(r3), .m3_packet_out(po3),
    .m3_end_bit(eb3), .m3_fifo_full(ff3), .m3_fifo_empty(fe3));

  mesh_driver #(.DIM(2), .XN(3), .YN(3), .ZN(1), .RANDOM_PACKETS(800)) drv2 (
    .clk(clk), .reset(rst2), .layer_address(la2), .source_xyz(s2), .destination_xyz(d2),
    .packet_data(pd2), .write(w2), .read(r2), .packet_out(po2), .end_bit(eb2),
    .fifo_full(ff2), .fifo_empty(fe2), .checks(c2), .failures(f2), .done(dn2));
  mesh_driver #(.DIM(3), .XN(3), .YN(3), .ZN(3), .RANDOM_PACKETS(800)) drv3 (
    .clk(clk), .reset(rst3), .layer_address(la3), .source_xyz(s3), .destination_xyz(d3),
    .packet_data(pd3), .write(w3), .read(r3), .packet_out(po3), .end_bit(eb3),
    .fifo_full(ff3), .fifo_empty(fe3), .checks(c3), .failures(f3), .done(dn3));

  int contention2 = 0, contention3 = 0, memfull2 = 0, memfull3 = 0;
  for (genvar n = 0; n < 9; n++) begin : g_m2
    always @(posedge clk) begin
      for (int o = 0; o < 5; o++)
        if ($countones(dut.u_mesh_2d.g_z[0].g_y[n / 3].g_x[n % 3].u_router.req[o]) > 1)
          contention2++;
      if (dut.u_mesh_2d.g_z[0].g_y[n / 3].g_x[n % 3].u_router.out_valid[4] &&
          dut.u_mesh_2d.node_full[n])
        memfull2++;
    end
  end
  for (genvar n = 0; n < 27; n++) begin : g_m3
    always @(posedge clk) begin
      for (int o = 0; o < 7; o++)
        if ($countones(dut.u_mesh_3d.g_z[n / 9].g_y[(n / 3) % 3].g_x[n % 3].u_router.req[o]) > 1)
          contention3++;
      if (dut.u_mesh_3d.g_z[n / 9].g_y[(n / 3) % 3].g_x[n % 3].u_router.out_valid[4] &&
          dut.u_mesh_3d.node_full[n])
        memfull3++;
    end
  end

  initial begin
    fork
      begin
        wait (dn2 && dn3);
        $display("2D: contention cycles %0d, node-memory-full cycles %0d", contention2, memfull2);
        $display("3D: contention cycles %0d, node-memory-full cycles %0d", contention3, memfull3);
        $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + 4,
                 f2 + f3 + (contention2 == 0) + (contention3 == 0) + (memfull2 == 0) + (memfull3 == 0));
      end
      begin
        repeat (4000000) @(posedge clk);
        $display("FAIL watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", c2 + c3, f2 + f3 + 1);
      end
    join_any
    $finish;
  end
endmodule
