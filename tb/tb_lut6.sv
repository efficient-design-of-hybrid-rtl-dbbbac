// Self-checking testbench for lut6: random truth tables, every address,
// each output compared with the truth-table bit the address selects.
module tb_lut6;
  logic [5:0]  le_in;
  logic [63:0] truth_cfg;
  logic        le_out;
  int checks = 0, failures = 0;

  lut6 #(.K(6)) dut (.le_in, .truth_cfg, .le_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      truth_cfg = {$urandom, $urandom};
      if (t == 0) truth_cfg = 64'h1;          // one-hot tables expose swaps
      if (t == 1) truth_cfg = 64'h8000_0000_0000_0000;
      for (int a = 0; a < 64; a++) begin
        le_in = 6'(a);
        #1;
        checks++;
        if (le_out !== truth_cfg[a]) begin
          failures++;
          $display("FAIL table=%h addr=%0d out=%b", truth_cfg, a, le_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
