// Self-checking testbench for ble, both kinds side by side (a MUX4 BLE and
// a 6-LUT BLE).  Random configurations and inputs; with the register bit
// clear the output must equal the LE function now, with it set the output
// must equal the LE function of the inputs one rising edge earlier, and 0
// right after reset.
module tb_ble;
  import hybrid_ref_pkg::*;
  logic clk = 0, rst_n;
  logic [5:0]  in_m, in_l;
  logic [4:0]  cfg_m;
  logic [64:0] cfg_l;
  logic        out_m, out_l;
  logic        prev_m, prev_l;
  int checks = 0, failures = 0, n_reg = 0, n_comb = 0;

  ble #(.IS_MUX4(1'b1)) dut_m (.clk, .rst_n, .ble_in(in_m), .cfg(cfg_m), .ble_out(out_m));
  ble #(.IS_MUX4(1'b0)) dut_l (.clk, .rst_n, .ble_in(in_l), .cfg(cfg_l), .ble_out(out_l));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic want, string what);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s got %b want %b", what, got, want); end
  endtask

  initial begin
    rst_n = 0;
    cfg_m = 5'b1_0000; cfg_l = {1'b1, 64'hffff_ffff_ffff_ffff};
    in_m = '0; in_l = '0;
    #2;
    check(out_m, 1'b0, "mux4 register reset");
    check(out_l, 1'b0, "lut register reset");
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      if (t % 50 == 0) begin
        cfg_m = 5'($urandom);
        cfg_l = {1'($urandom), $urandom, $urandom};
        // hold inputs for one cycle so the register holds a known value
        @(negedge clk);
      end
      prev_m = ref_mux4(in_m, cfg_m[3:0]);
      prev_l = ref_lut(in_l, cfg_l[63:0]);
      @(negedge clk);
      in_m = 6'($urandom); in_l = 6'($urandom);
      #1;
      if (cfg_m[4]) begin check(out_m, prev_m, "mux4 registered"); n_reg++; end
      else          begin check(out_m, ref_mux4(in_m, cfg_m[3:0]), "mux4 comb"); n_comb++; end
      if (cfg_l[64]) begin check(out_l, prev_l, "lut registered"); n_reg++; end
      else           begin check(out_l, ref_lut(in_l, cfg_l[63:0]), "lut comb"); n_comb++; end
    end
    checks++;
    if (n_reg == 0 || n_comb == 0) begin failures++; $display("FAIL a path was never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
