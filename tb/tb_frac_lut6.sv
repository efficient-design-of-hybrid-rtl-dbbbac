// Self-checking testbench for frac_lut6: random truth tables in 6-LUT mode
// and in fractured (two 5-LUT) mode, all 256 input patterns, both outputs
// compared with the truth-table entries the mode selects.
module tb_frac_lut6;
  import hybrid_ref_pkg::*;
  logic [7:0]  le_in;
  logic [63:0] truth_cfg;
  logic        frac_cfg;
  logic [1:0]  le_out;
  int checks = 0, failures = 0;

  frac_lut6 dut (.le_in, .truth_cfg, .frac_cfg, .le_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      truth_cfg = {$urandom, $urandom};
      frac_cfg  = t[0];
      for (int v = 0; v < 256; v++) begin
        le_in = 8'(v);
        #1;
        checks++;
        if (le_out !== ref_frac_lut(le_in, truth_cfg, frac_cfg)) begin
          failures++;
          $display("FAIL frac=%b table=%h in=%h out=%b", frac_cfg, truth_cfg, le_in, le_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
