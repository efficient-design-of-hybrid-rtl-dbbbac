// Self-checking testbench for dual_mux4: all 256 input patterns under
// random and one-hot inversion settings, both outputs compared with the
// reference (shared selects le_in[7:6], data pins 3:0 and 5:2).
module tb_dual_mux4;
  import hybrid_ref_pkg::*;
  logic [7:0] le_in, inv_cfg;
  logic [1:0] le_out;
  int checks = 0, failures = 0;

  dual_mux4 dut (.le_in, .inv_cfg, .le_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 24; c++) begin
      inv_cfg = (c < 8) ? 8'(1 << c) : 8'($urandom);
      for (int v = 0; v < 256; v++) begin
        le_in = 8'(v);
        #1;
        checks++;
        if (le_out !== ref_dual_mux4(le_in, inv_cfg)) begin
          failures++;
          $display("FAIL inv=%h in=%h out=%b", inv_cfg, le_in, le_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
