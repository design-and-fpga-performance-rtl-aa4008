// router_harness: drives one noc_router with random traffic and checks it.
//
// Every input port offers flits (valid held until accepted) with random
// destinations in a 3x3(x3) mesh and a unique tag in the data field; every
// output takes flits with random readiness. Each flit leaving the router is
// checked: it must leave by the port dimension-ordered routing names, and
// per (input, output) pair flits must leave in the order they entered.
// At the end every flit must have left. It also checks the two-cycle
// latency of a lone flit, and counts output contention and back-pressure
// so the test can insist that both happened.
module router_harness #(
  parameter int DIM = 3,
  parameter int X = 1,
  parameter int Y = 1,
  parameter int Z = 1,
  parameter int FLITS_PER_PORT = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  import noc_pkg::*;
  localparam int NP = num_ports(DIM);

  logic  reset = 1;
  logic  in_valid [NP], in_ready [NP], out_valid [NP], out_ready [NP];
  flit_t in_flit [NP], out_flit [NP];

  noc_router #(.DIM(DIM), .X(X), .Y(Y), .Z(Z)) dut (.*);

  flit_t expq [NP][NP][$];   // [input][output] queue of expected flits
  int sent [NP];
  int received = 0;
  int contention = 0, backpressure = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0dD router: %s at %0t", DIM, what, $time);
    end
  endtask

  function automatic port_e ref_route(input addr_t d);
    if (int'(d.x) != X) return int'(d.x) > X ? PORT_EAST : PORT_WEST;
    if (int'(d.y) != Y) return int'(d.y) > Y ? PORT_NORTH : PORT_SOUTH;
    if (DIM == 3 && int'(d.z) != Z) return int'(d.z) > Z ? PORT_UP : PORT_DOWN;
    return PORT_LOCAL;
  endfunction

  function automatic flit_t make_flit(input int i, input int n);
    flit_t f;
    f.end_bit = 1'b1;
    f.layer   = '0;
    f.src     = '{x: coord_t'(X), y: coord_t'(Y), z: coord_t'(Z)};
    f.dst     = '{x: coord_t'($urandom_range(0, 2)), y: coord_t'($urandom_range(0, 2)),
                  z: (DIM == 3) ? coord_t'($urandom_range(0, 2)) : '0};
    f.data    = {32'(i), 32'(n), $urandom, $urandom};
    return f;
  endfunction

  // Observe outputs at each edge.
  always @(posedge clk) begin
    if (!reset) begin
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          automatic int src_in;
          src_in = int'(out_flit[o].data[127:96]);
          received++;
          check(int'(ref_route(out_flit[o].dst)) == o, "flit left by the wrong port");
          if (src_in < NP && expq[src_in][o].size() > 0) begin
            check(out_flit[o] == expq[src_in][o][0], "flit order or content");
            void'(expq[src_in][o].pop_front());
          end else
            check(0, $sformatf("unexpected flit in=%0d out=%0d n=%0d q=%0d", src_in, o, out_flit[o].data[95:64], (src_in < NP) ? expq[src_in][o].size() : -1));
        end
      end
      for (int o = 0; o < NP; o++) begin
        automatic int n = 0;
        for (int i = 0; i < NP; i++) if (dut.req[o][i]) n++;
        if (n > 1) contention++;
      end
      for (int i = 0; i < NP; i++)
        if (in_valid[i] && !in_ready[i]) backpressure++;
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < NP; i++) begin
      in_valid[i] = 0; in_flit[i] = '0; out_ready[i] = 1; sent[i] = 0;
    end
    repeat (3) @(posedge clk);
    reset = 0;

    // Latency of a lone flit: enters at edge k, valid at the output after k+1.
    @(negedge clk);
    in_flit[PORT_LOCAL] = make_flit(PORT_LOCAL, 0);
    in_flit[PORT_LOCAL].dst = '{x: coord_t'(X + 1), y: coord_t'(Y), z: coord_t'(Z)};
    in_valid[PORT_LOCAL] = 1;
    expq[PORT_LOCAL][PORT_EAST].push_back(in_flit[PORT_LOCAL]);
    @(posedge clk); #1 in_valid[PORT_LOCAL] = 0;
    check(!out_valid[PORT_EAST], "latency: output too early");
    @(posedge clk); #1;
    check(out_valid[PORT_EAST], "latency: output not after two edges");
    @(negedge clk);

    // Random traffic.
    fork
      for (int i = 0; i < NP; i++) begin
        fork
          automatic int ii = i;
          begin
            for (int n = 1; n <= FLITS_PER_PORT; n++) begin
              automatic flit_t f;
              @(negedge clk);
              f = make_flit(ii, n);
              in_flit[ii]  = f;
              in_valid[ii] = ($urandom_range(0, 3) != 0);
              while (!in_valid[ii]) begin
                @(negedge clk);
                in_valid[ii] = ($urandom_range(0, 3) != 0);
              end
              expq[ii][int'(ref_route(f.dst))].push_back(f);
              do @(posedge clk); while (!in_ready[ii]);
              #1 in_valid[ii] = 0;
              sent[ii]++;
            end
          end
        join_none
      end
      begin
        for (int c = 0; c < FLITS_PER_PORT * NP * 4; c++) begin
          @(negedge clk);
          for (int o = 0; o < NP; o++) out_ready[o] = ($urandom_range(0, 2) != 0);
        end
      end
    join_any
    wait fork;
    for (int o = 0; o < NP; o++) out_ready[o] = 1;
    repeat (40) @(posedge clk);
    for (int i = 0; i < NP; i++)
      for (int o = 0; o < NP; o++)
        check(expq[i][o].size() == 0, "flit never left");
    check(received == 1 + NP * FLITS_PER_PORT, "flit count");
    check(contention > 0, "output contention happened");
    check(backpressure > 0, "back-pressure happened");
    $display("%0dD router: %0d flits, contention cycles %0d, back-pressure cycles %0d",
             DIM, received, contention, backpressure);
    done = 1;
  end
endmodule
