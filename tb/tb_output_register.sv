// tb_output_register: self-checking test of output_register. A one-entry
// model is driven with random loads (only while free) and random receiver
// readiness; out_valid, out_flit and free are compared every cycle, and a
// back-to-back load while the old flit leaves is made to happen.
module tb_output_register;
  import noc_pkg::*;
  logic clk = 0, reset = 1;
  logic load = 0, free, out_valid, out_ready = 0;
  flit_t din = '0, out_flit;
  int checks = 0, failures = 0;
  bit m_valid = 0;
  flit_t m_flit;
  int back_to_back = 0;

  output_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    reset = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (out_valid != m_valid || (m_valid && out_flit != m_flit)) begin
        failures++;
        $display("FAIL state at cycle %0d", c);
      end
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (free != (!m_valid || out_ready)) begin
        failures++;
        $display("FAIL free at cycle %0d", c);
      end
      load = free && ($urandom_range(0, 1) != 0);
      din  = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      if (load && m_valid && out_ready) back_to_back++;
      @(posedge clk);
      #1;
      if (load) begin
        m_valid = 1; m_flit = din;
      end else if (out_ready) m_valid = 0;
      load = 0;
    end
    checks++;
    if (back_to_back == 0) begin
      failures++;
      $display("FAIL no back-to-back load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
