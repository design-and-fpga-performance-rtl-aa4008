// mesh_driver: host-side stimulus and checker for one noc_mesh host port.
//
// Runs, in order:
//  1. the four published transfer scenarios (layer 0, one 128-bit packet
//     each, data FF00.., F00F.., 33F0.., F0CC..). The first uses the
//     published addresses 102 -> 222; the others use the published data with
//     in-mesh addresses. After write, the packet must reach the destination
//     node memory exactly 2*(hops+1) clock edges after the write edge; a read
//     must then return the data with the end bit set and leave fifo_empty = 1
//     and fifo_full = 0.
//  2. writes to addresses outside the mesh (e.g. 323 in a 3x3x3 mesh): they
//     must show fifo_full and deliver nothing.
//  3. a hot spot: many sources write to one node that is not read, until
//     the network backs up and a source shows fifo_full; then all is drained.
//  4. random traffic: writes with random in-mesh source and destination,
//     then read sweeps over every node. Each packet carries its source and
//     a sequence number; packets from one source to one destination must
//     arrive in order, and every packet must arrive exactly once.
// Counters report how often each mechanism happened; a mechanism that never
// happened counts as a failure.
module mesh_driver #(
  parameter int DIM = 3,
  parameter int XN = 3,
  parameter int YN = 3,
  parameter int ZN = 3,
  parameter int RANDOM_PACKETS = 400
) (
  input  logic         clk,
  output logic         reset,
  output logic [2:0]   layer_address,
  output logic [8:0]   source_xyz,
  output logic [8:0]   destination_xyz,
  output logic [127:0] packet_data,
  output logic         write,
  output logic         read,
  input  logic [127:0] packet_out,
  input  logic         end_bit,
  input  logic         fifo_full,
  input  logic         fifo_empty,
  output int           checks,
  output int           failures,
  output bit           done
);
  localparam int NN = XN * YN * ZN;

  int full_stalls = 0, rejected = 0, delivered = 0, sweeps = 0;
  logic [127:0] expq [NN][$];   // per destination, in write order

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0dD mesh: %s at %0t", DIM, what, $time);
    end
  endtask

  function automatic logic [8:0] addr_of(input int n);
    return {3'(n % XN), 3'((n / XN) % YN), 3'(n / (XN * YN))};
  endfunction

  function automatic int hops(input logic [8:0] a, input logic [8:0] b);
    int d = 0;
    for (int k = 0; k < 3; k++) begin
      int u = int'(a[k*3 +: 3]);
      int v = int'(b[k*3 +: 3]);
      d += (u > v) ? u - v : v - u;
    end
    return d;
  endfunction

  // Idle the host pins (call at a negedge).
  task automatic idle();
    write = 0; read = 0;
  endtask

  // One write at the next edge; returns 0 if the source showed fifo_full.
  task automatic do_write(input logic [8:0] src, input logic [8:0] dst,
                          input logic [127:0] data, output bit ok);
    @(negedge clk);
    source_xyz = src; destination_xyz = dst; packet_data = data;
    layer_address = 3'b000;
    read = 0;
    #1;
    ok = !fifo_full;
    write = ok;
    @(posedge clk);
    #1 write = 0;
  endtask

  // One read from node dst; returns 0 if its memory was empty.
  task automatic do_read(input logic [8:0] dst, output bit ok, output logic [127:0] data,
                         output logic eb);
    @(negedge clk);
    destination_xyz = dst; write = 0;
    #1;
    ok = !fifo_empty;
    read = ok;
    @(posedge clk);
    #1 read = 0;
    data = packet_out;
    eb = end_bit;
  endtask

  // Read everything that node n holds and match it against expectations.
  task automatic drain_node(input int n);
    bit ok;
    logic [127:0] d;
    logic eb;
    int reads = 0;
    do begin
      do_read(addr_of(n), ok, d, eb);
      reads++;
      if (ok) begin
        int hit = -1;
        delivered++;
        check(eb, "end bit");
        // first remaining packet from the same source must be this one
        for (int k = 0; k < expq[n].size(); k++)
          if (expq[n][k][127:96] == d[127:96]) begin
            hit = k;
            break;
          end
        if (hit >= 0) begin
          check(expq[n][hit] == d, $sformatf("packet order/content at node %0d", n));
          expq[n].delete(hit);
        end else
          check(0, $sformatf("unexpected packet at node %0d", n));
      end
    end while (ok && reads < 64 && failures < 20);
  endtask

  task automatic drain_all();
    int left;
    for (int s = 0; s < 200; s++) begin
      sweeps++;
      for (int n = 0; n < NN; n++) drain_node(n);
      left = 0;
      for (int n = 0; n < NN; n++) left += expq[n].size();
      if (left == 0 || failures >= 20) break;
      repeat (20) @(posedge clk);
    end
    check(left == 0, $sformatf("%0d packets never delivered", left));
  endtask

  initial begin
    logic [127:0] tc_data [4];
    logic [8:0]   tc_src [4], tc_dst [4];
    bit ok;
    logic [127:0] d;
    logic eb;
    int lat;

    checks = 0; failures = 0; done = 0;
    reset = 1; write = 0; read = 0; layer_address = '0;
    source_xyz = '0; destination_xyz = '0; packet_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // ---- 1. published scenarios ----
    tc_data[0] = {8{16'hFF00}};
    tc_data[1] = {8{16'hF00F}};
    tc_data[2] = {8{16'h33F0}};
    tc_data[3] = {8{16'hF0CC}};
    if (DIM == 3) begin
      tc_src[0] = 9'o102; tc_dst[0] = 9'o222;
      tc_src[1] = 9'o221; tc_dst[1] = 9'o112;
      tc_src[2] = 9'o202; tc_dst[2] = 9'o011;
      tc_src[3] = 9'o020; tc_dst[3] = 9'o120;
    end else begin
      tc_src[0] = 9'o100; tc_dst[0] = 9'o220;
      tc_src[1] = 9'o210; tc_dst[1] = 9'o110;
      tc_src[2] = 9'o200; tc_dst[2] = 9'o010;
      tc_src[3] = 9'o020; tc_dst[3] = 9'o120;
    end
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      destination_xyz = tc_dst[t]; #1;
      check(fifo_empty, "destination empty before the transfer");
      do_write(tc_src[t], tc_dst[t], tc_data[t], ok);
      check(ok, "source FIFO not full");
      // count edges until the packet sits in the destination node memory
      destination_xyz = tc_dst[t];
      lat = 0;
      #1;
      while (fifo_empty && lat < 100) begin
        @(posedge clk); #1;
        lat++;
      end
      check(lat == 2 * (hops(tc_src[t], tc_dst[t]) + 1),
            $sformatf("latency %0d edges, expected %0d", lat, 2 * (hops(tc_src[t], tc_dst[t]) + 1)));
      do_read(tc_dst[t], ok, d, eb);
      check(ok && d == tc_data[t] && eb, "packet_out after read");
      #1;
      check(fifo_empty && !fifo_full, "fifo_empty=1 fifo_full=0 after read");
    end

    // ---- 2. addresses outside the mesh ----
    begin
      logic [8:0] bad [2];
      bad[0] = (DIM == 3) ? 9'o323 : 9'o310;
      bad[1] = (DIM == 3) ? 9'o023 : 9'o030;
      foreach (bad[b]) begin
        do_write(bad[b], 9'o000, '1, ok);
        check(!ok, "write to a node outside the mesh refused");
        if (!ok) rejected++;
      end
      repeat (30) @(posedge clk);
      for (int n = 0; n < NN; n++) begin
        @(negedge clk); destination_xyz = addr_of(n); #1;
        check(fifo_empty, "nothing delivered from outside addresses");
      end
    end

    // ---- 3. hot spot until a source is full ----
    begin
      automatic int hot = NN - 1;
      automatic int seq = 0;
      for (int k = 0; k < 60 && full_stalls == 0; k++) begin
        automatic int s = k % (NN - 1);
        automatic logic [127:0] pk = {32'(s), 32'(seq), 64'hC0FFEE};
        do_write(addr_of(s), addr_of(hot), pk, ok);
        if (ok) begin
          expq[hot].push_back(pk);
          seq++;
        end else full_stalls++;
      end
      // one source keeps writing until its Local FIFO is full
      for (int k = 0; k < 40 && full_stalls == 0; k++) begin
        automatic logic [127:0] pk = {32'(0), 32'(seq), 64'hBEEF};
        do_write(addr_of(0), addr_of(hot), pk, ok);
        if (ok) begin
          expq[hot].push_back(pk);
          seq++;
        end else full_stalls++;
      end
      drain_all();
    end

    // ---- 4. random traffic ----
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < RANDOM_PACKETS / 4; k++) begin
        automatic int s = $urandom_range(0, NN - 1);
        automatic int t = $urandom_range(0, NN - 1);
        automatic logic [127:0] pk = {32'(s), 32'(r * 100000 + k), $urandom, $urandom};
        do_write(addr_of(s), addr_of(t), pk, ok);
        if (ok) expq[t].push_back(pk);
        else full_stalls++;
      end
      drain_all();
    end

    check(full_stalls > 0, "injection back-pressure (fifo_full) happened");
    check(rejected > 0, "out-of-mesh address refused");
    check(delivered > RANDOM_PACKETS / 2, "packets delivered");
    $display("%0dD mesh (%0dx%0dx%0d): delivered %0d, fifo_full stalls %0d, refused %0d, read sweeps %0d",
             DIM, XN, YN, ZN, delivered, full_stalls, rejected, sweeps);
    done = 1;
  end
endmodule
