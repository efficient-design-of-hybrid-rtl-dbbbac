// End-to-end testbench for hybrid_fpga_top at its default parameters: the
// nonfracturable CLB (4 MUX4 : 6 LUT) and the fracturable CLB (2 Dual MUX4 :
// 8 fracturable LUT) side by side.
//
// Each round draws a random configuration image for both blocks with
// ClbModel (loops through the crossbar feedback always pass a flip-flop),
// shifts both in through their chains at once, checks that loading takes
// exactly CFG_W clocks and that cfg_out streams the previous image, resets
// the user flip-flops with rst_n (the configuration must survive), and then
// compares every output with the reference model for NCYC cycles of random
// inputs.  Each mechanism the design has is counted and must occur: chain
// load and readout, crossbar feedback, registered and combinational BLE
// outputs, MUX4 and LUT elements, 6-LUT and fractured LUT modes, user reset.
module tb_hybrid_fpga_top;
  import hybrid_ref_pkg::*;
  localparam int NCFG = 6, NCYC = 200;
  logic clk = 0, rst_n = 0, cfg_rst_n = 0;
  logic nf_cfg_en, nf_cfg_in, nf_cfg_out, fr_cfg_en, fr_cfg_in, fr_cfg_out;
  logic [39:0] nf_in;
  logic [9:0]  nf_out;
  logic [79:0] fr_in;
  logic [19:0] fr_out;
  int checks = 0, failures = 0, cycles = 0;
  int n_load = 0, n_readout = 0, n_fb = 0, n_reg = 0, n_comb = 0, n_frac = 0, n_six = 0;
  int n_mux4 = 0, n_lut = 0, n_ureset = 0;

  hybrid_fpga_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    ClbModel mn = new(0, 40, 10, 4);
    ClbModel mf = new(1, 80, 10, 2);
    bit old_n[], old_f[];
    logic [127:0] rv;
    bit [31:0] en, ef;
    int c0, wmax;
    rst_n = 0; cfg_rst_n = 0;
    nf_cfg_en = 0; nf_cfg_in = 0; fr_cfg_en = 0; fr_cfg_in = 0;
    nf_in = '0; fr_in = '0;
    #12 rst_n = 1; cfg_rst_n = 1;
    wmax = (mn.cfg_w > mf.cfg_w) ? mn.cfg_w : mf.cfg_w;
    for (int c = 0; c < NCFG; c++) begin
      old_n = mn.img; old_f = mf.img;
      mn.randomize_cfg(c == 0 ? 0 : 40);
      mf.randomize_cfg(c == 0 ? 0 : 40);
      n_fb += mn.n_fb_pins + mf.n_fb_pins;
      n_frac += mf.n_frac_mode; n_six += mf.n_lut6_mode;
      @(negedge clk);
      c0 = cycles;
      // both chains shift together; the shorter one starts later
      for (int k = wmax - 1; k >= 0; k--) begin
        nf_cfg_en = (k < mn.cfg_w); fr_cfg_en = (k < mf.cfg_w);
        if (k < mn.cfg_w) begin
          if (c > 0) begin check(nf_cfg_out == old_n[k], "nf cfg_out readout"); n_readout++; end
          nf_cfg_in = mn.img[k];
        end
        if (k < mf.cfg_w) begin
          if (c > 0) begin check(fr_cfg_out == old_f[k], "fr cfg_out readout"); n_readout++; end
          fr_cfg_in = mf.img[k];
        end
        @(negedge clk);
      end
      nf_cfg_en = 0; fr_cfg_en = 0;
      check(cycles - c0 == wmax, "load takes CFG_W clocks");
      n_load++;
      // user reset: flip-flops to 0, configuration kept
      rst_n = 0; #1;
      foreach (mn.q[k]) mn.q[k] = 0;
      foreach (mf.q[k]) mf.q[k] = 0;
      for (int o = 0; o < 10; o++) if (mn.reg_use[o]) check(nf_out[o] == 0, "nf reset output");
      for (int o = 0; o < 20; o++) if (mf.reg_use[o]) check(fr_out[o] == 0, "fr reset output");
      n_ureset++;
      rst_n = 1;
      for (int t = 0; t < NCYC; t++) begin
        rv = {$urandom, $urandom, $urandom, $urandom};
        nf_in = rv[39:0];
        fr_in = {rv[127:88], rv[39:0]} ^ {$urandom, $urandom, 16'($urandom)};
        #1;
        en = mn.eval(128'(nf_in));
        ef = mf.eval(128'(fr_in));
        for (int o = 0; o < 10; o++) begin
          check(nf_out[o] === en[o], $sformatf("nf out %0d cfg %0d cycle %0d", o, c, t));
          if (o < 4) n_mux4++; else n_lut++;
          if (mn.reg_use[o]) n_reg++; else n_comb++;
        end
        for (int o = 0; o < 20; o++) begin
          check(fr_out[o] === ef[o], $sformatf("fr out %0d cfg %0d cycle %0d", o, c, t));
          if (o < 4) n_mux4++; else n_lut++;
          if (mf.reg_use[o]) n_reg++; else n_comb++;
        end
        @(posedge clk);
        mn.clock(); mf.clock();
        @(negedge clk);
      end
    end
    $display("mechanisms: loads=%0d readout bits=%0d feedback pins=%0d registered=%0d combinational=%0d",
             n_load, n_readout, n_fb, n_reg, n_comb);
    $display("mechanisms: mux4 checks=%0d lut checks=%0d fractured LUTs=%0d six-LUTs=%0d user resets=%0d",
             n_mux4, n_lut, n_frac, n_six, n_ureset);
    check(n_load > 0 && n_readout > 0, "configuration load and readout");
    check(n_fb > 0, "crossbar feedback");
    check(n_reg > 0 && n_comb > 0, "registered and combinational outputs");
    check(n_mux4 > 0 && n_lut > 0, "MUX4 and LUT elements");
    check(n_frac > 0 && n_six > 0, "fractured and 6-LUT modes");
    check(n_ureset > 0, "user reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
