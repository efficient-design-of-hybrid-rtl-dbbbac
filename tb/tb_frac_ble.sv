// Self-checking testbench for frac_ble, both kinds side by side (a Dual
// MUX4 BLE and a fracturable-LUT BLE).  Random configurations, including
// both LUT modes, and random inputs; each of the two outputs is checked
// combinationally or one rising edge late according to its register bit.
module tb_frac_ble;
  import hybrid_ref_pkg::*;
  logic clk = 0, rst_n;
  logic [7:0]  in_m, in_l;
  logic [9:0]  cfg_m;
  logic [66:0] cfg_l;
  logic [1:0]  out_m, out_l, prev_m, prev_l, now_m, now_l;
  int checks = 0, failures = 0, n_reg = 0, n_comb = 0, n_frac = 0, n_six = 0;

  frac_ble #(.IS_MUX4(1'b1)) dut_m (.clk, .rst_n, .ble_in(in_m), .cfg(cfg_m), .ble_out(out_m));
  frac_ble #(.IS_MUX4(1'b0)) dut_l (.clk, .rst_n, .ble_in(in_l), .cfg(cfg_l), .ble_out(out_l));

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
    cfg_m = 10'b11_0000_0000; cfg_l = {2'b11, 1'b0, {64{1'b1}}};
    in_m = '0; in_l = '0;
    #2;
    check(out_m[0] | out_m[1], 1'b0, "dual mux4 registers reset");
    check(out_l[0] | out_l[1], 1'b0, "frac lut registers reset");
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      if (t % 50 == 0) begin
        cfg_m = 10'($urandom);
        cfg_l = {3'($urandom), $urandom, $urandom};
        @(negedge clk);
      end
      prev_m = ref_dual_mux4(in_m, cfg_m[7:0]);
      prev_l = ref_frac_lut(in_l, cfg_l[63:0], cfg_l[64]);
      @(negedge clk);
      in_m = 8'($urandom); in_l = 8'($urandom);
      #1;
      now_m = ref_dual_mux4(in_m, cfg_m[7:0]);
      now_l = ref_frac_lut(in_l, cfg_l[63:0], cfg_l[64]);
      if (cfg_l[64]) n_frac++; else n_six++;
      for (int o = 0; o < 2; o++) begin
        check(out_m[o], cfg_m[8+o] ? prev_m[o] : now_m[o], "dual mux4 out");
        check(out_l[o], cfg_l[65+o] ? prev_l[o] : now_l[o], "frac lut out");
        if (cfg_m[8+o]) n_reg++; else n_comb++;
      end
    end
    checks++;
    if (n_reg == 0 || n_comb == 0 || n_frac == 0 || n_six == 0) begin
      failures++; $display("FAIL a path or mode was never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
