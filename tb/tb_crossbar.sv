// tb_crossbar: self-checking test of the 7x7 and 5x5 crossbars with random
// flits, random selections and random enables.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  flit_t in7 [7], out7 [7];
  logic [2:0] sel7 [7];
  logic [6:0] en7, v7;
  flit_t in5 [5], out5 [5];
  logic [2:0] sel5 [5];
  logic [4:0] en5, v5;

  crossbar #(.N(7)) dut7 (.in_flit(in7), .sel(sel7), .en(en7), .out_flit(out7), .out_valid(v7));
  crossbar #(.N(5)) dut5 (.in_flit(in5), .sel(sel5), .en(en5), .out_flit(out5), .out_valid(v5));

  function automatic flit_t rand_flit();
    return flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 7; i++) begin
        in7[i] = rand_flit();
        sel7[i] = 3'($urandom_range(0, 6));
      end
      for (int i = 0; i < 5; i++) begin
        in5[i] = rand_flit();
        sel5[i] = 3'($urandom_range(0, 4));
      end
      en7 = 7'($urandom);
      en5 = 5'($urandom);
      #1;
      for (int o = 0; o < 7; o++) begin
        checks++;
        if (v7[o] != en7[o] || (en7[o] && out7[o] != in7[sel7[o]])) begin
          failures++;
          $display("FAIL 7x7 output %0d", o);
        end
      end
      for (int o = 0; o < 5; o++) begin
        checks++;
        if (v5[o] != en5[o] || (en5[o] && out5[o] != in5[sel5[o]])) begin
          failures++;
          $display("FAIL 5x5 output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
