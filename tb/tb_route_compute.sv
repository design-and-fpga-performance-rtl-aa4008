// tb_route_compute: exhaustive test of route_compute for the 3x3 2D mesh
// (XY routing) and the 3x3x3 3D mesh (XYZ routing). The expected port is
// worked out from the dimension order: X first, then Y, then Z.
module tb_route_compute;
  import noc_pkg::*;

  addr_t my2, dst2, my3, dst3;
  port_e p2, p3;
  int checks = 0, failures = 0;

  route_compute #(.DIM(2)) dut2 (.my_addr(my2), .dst_addr(dst2), .out_port(p2));
  route_compute #(.DIM(3)) dut3 (.my_addr(my3), .dst_addr(dst3), .out_port(p3));

  function automatic port_e expect_port(input int dim, input addr_t m, input addr_t d);
    int dx = int'(d.x) - int'(m.x);
    int dy = int'(d.y) - int'(m.y);
    int dz = int'(d.z) - int'(m.z);
    if (dx != 0) return dx > 0 ? PORT_EAST : PORT_WEST;
    if (dy != 0) return dy > 0 ? PORT_NORTH : PORT_SOUTH;
    if (dim == 3 && dz != 0) return dz > 0 ? PORT_UP : PORT_DOWN;
    return PORT_LOCAL;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 27; a++)
      for (int b = 0; b < 27; b++) begin
        my3 = '{x: coord_t'(a % 3), y: coord_t'((a / 3) % 3), z: coord_t'(a / 9)};
        dst3 = '{x: coord_t'(b % 3), y: coord_t'((b / 3) % 3), z: coord_t'(b / 9)};
        my2 = my3; my2.z = '0;
        dst2 = dst3; dst2.z = '0;
        #1;
        checks++;
        if (p3 != expect_port(3, my3, dst3)) begin
          failures++;
          $display("FAIL 3D my=%o dst=%o got %0d", my3, dst3, p3);
        end
        if (a < 9 && b < 9) begin
          checks++;
          if (p2 != expect_port(2, my2, dst2)) begin
            failures++;
            $display("FAIL 2D my=%o dst=%o got %0d", my2, dst2, p2);
          end
        end
      end
    // a few hand-worked cases from the router numbering
    my3 = 9'o000; dst3 = 9'o222; #1; checks++; if (p3 != PORT_EAST)  failures++;
    my3 = 9'o200; dst3 = 9'o222; #1; checks++; if (p3 != PORT_NORTH) failures++;
    my3 = 9'o220; dst3 = 9'o222; #1; checks++; if (p3 != PORT_UP)    failures++;
    my3 = 9'o222; dst3 = 9'o220; #1; checks++; if (p3 != PORT_DOWN)  failures++;
    my3 = 9'o112; dst3 = 9'o112; #1; checks++; if (p3 != PORT_LOCAL) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
