// tb_flit_fifo: self-checking test of flit_fifo.
// Drives random writes and reads (obeying the handshake rules, plus
// simultaneous read and write while full) against a queue model and checks
// head data, empty and full every cycle.
module tb_flit_fifo;
  localparam int WIDTH = noc_pkg::FLIT_W;
  localparam int DEPTH = 4;

  logic clk = 0, reset = 1;
  logic wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];
  int saw_full = 0, saw_rw_full = 0;

  flit_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare with the model
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      if (full) saw_full++;
      // pick the next operation; phases bias toward filling or draining
      rd_en   = (model.size() > 0) && ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 70 : 30));
      wr_en   = ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 30 : 70));
      if (model.size() == DEPTH && !rd_en) wr_en = 0;
      if (model.size() == DEPTH && rd_en && wr_en) saw_rw_full++;
      wr_data = {$urandom, $urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(saw_full > 0, "reached full");
    check(saw_rw_full > 0, "read and write while full");
    // reset empties it
    reset = 1;
    @(posedge clk); #1 reset = 0; model.delete();
    check(empty && !full, "empty after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
