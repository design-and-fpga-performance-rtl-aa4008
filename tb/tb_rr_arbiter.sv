// tb_rr_arbiter: self-checking test of rr_arbiter (N = 7).
// A model keeps the round-robin pointer; random request patterns and
// advance values are applied and the grant is compared every cycle. A
// fairness check then holds all requests high and expects every requester
// to be served once in each run of N grants.
module tb_rr_arbiter;
  localparam int N = 7;
  logic clk = 0, reset = 1;
  logic [N-1:0] req = '0, grant;
  logic advance = 0;
  int checks = 0, failures = 0;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] model_grant(input logic [N-1:0] r, input int p);
    for (int i = 0; i < N; i++)
      if (r[(p + i) % N]) return N'(1) << ((p + i) % N);
    return '0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int served [N];
    repeat (2) @(posedge clk);
    reset = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      req = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (grant != model_grant(req, ptr)) begin
        failures++;
        $display("FAIL req=%b ptr=%0d grant=%b", req, ptr, grant);
      end
      if (advance && req != 0)
        for (int i = 0; i < N; i++)
          if (grant[i]) ptr = (i + 1) % N;
    end
    // fairness: all requesting, every input served once per N grants
    @(negedge clk);
    req = '1; advance = 1;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < N; i++) served[i] = 0;
      for (int k = 0; k < N; k++) begin
        #1;
        for (int i = 0; i < N; i++) if (grant[i]) served[i]++;
        @(negedge clk);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (served[i] != 1) begin
          failures++;
          $display("FAIL fairness input %0d served %0d", i, served[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
