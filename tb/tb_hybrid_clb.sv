// Self-checking testbench for hybrid_clb, the nonfracturable hybrid CLB (40 inputs, ten 6-input BLEs, 4 MUX4 : 6 LUT), at its default size.
//
// For each of NCFG random configuration images (drawn by ClbModel so that
// loops through the crossbar feedback always pass a flip-flop) the image is
// shifted in through the serial chain, MSB first, which must take exactly
// CFG_W clocks.  Then random inputs are applied for NCYC cycles and every
// output is compared, half a cycle after the inputs change, with the
// reference model; the model's flip-flops advance on each rising edge.
// While the next image is shifted in, cfg_out must stream the old image.
// Counted mechanisms: crossbar feedback, registered outputs, MUX4 and LUT
// BLEs.
module tb_hybrid_clb;
  import hybrid_ref_pkg::*;
  localparam int N_IN = 40, N_OUT = 10, N_MUX4 = 4, NCFG = 6, NCYC = 200;
  logic clk = 0, rst_n = 0, cfg_rst_n = 0, cfg_en = 0, cfg_in, cfg_out;
  logic [N_IN-1:0]  clb_in;
  logic [N_OUT-1:0] clb_out;
  int checks = 0, failures = 0, cycles = 0;
  int n_fb = 0, n_reg = 0, n_mux4_chk = 0, n_lut_chk = 0, n_frac = 0, n_six = 0;

  hybrid_clb #(.N_IN(N_IN), .N_BLE(10), .N_MUX4(N_MUX4)) dut (
    .clk, .rst_n, .cfg_rst_n, .cfg_en, .cfg_in, .cfg_out, .clb_in, .clb_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    ClbModel m = new(0, N_IN, 10, N_MUX4);
    bit old_img[];
    logic [127:0] in_v;
    bit [31:0] exp_o;
    int c0;
    check(m.cfg_w == $bits(dut.cfg_bits), "configuration width");
    rst_n = 0; cfg_rst_n = 0; cfg_en = 0; cfg_in = 0; clb_in = '0;
    #12 rst_n = 1; cfg_rst_n = 1;
    for (int c = 0; c < NCFG; c++) begin
      old_img = m.img;
      m.randomize_cfg(c == 0 ? 0 : 40);
      n_fb += m.n_fb_pins; n_frac += m.n_frac_mode; n_six += m.n_lut6_mode;
      foreach (m.reg_use[k]) n_reg += m.reg_use[k];
      @(negedge clk);
      c0 = cycles;
      for (int b = m.cfg_w - 1; b >= 0; b--) begin
        if (c > 0) check(cfg_out == old_img[b], "cfg_out streams the old image");
        cfg_en = 1; cfg_in = m.img[b];
        @(negedge clk);
      end
      cfg_en = 0;
      check(cycles - c0 == m.cfg_w, "load takes CFG_W clocks");
      // flip-flops hold whatever the shifting images produced: align model
      foreach (m.q[k]) m.q[k] = 0;
      rst_n = 0; #1 rst_n = 1;
      for (int t = 0; t < NCYC; t++) begin
        in_v = {$urandom, $urandom, $urandom, $urandom};
        clb_in = in_v[N_IN-1:0];
        #1;
        exp_o = m.eval(128'(clb_in));
        for (int o = 0; o < N_OUT; o++) begin
          checks++;
          if (clb_out[o] !== exp_o[o]) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d cycle %0d out %0d got %b want %b", c, t, o, clb_out[o], exp_o[o]);
          end
          if (o / 1 < N_MUX4) n_mux4_chk++; else n_lut_chk++;
        end
        @(posedge clk);
        m.clock();
        @(negedge clk);
      end
    end
    $display("mechanisms: feedback pins=%0d registered outputs=%0d mux4 checks=%0d lut checks=%0d fractured=%0d six-lut=%0d",
             n_fb, n_reg, n_mux4_chk, n_lut_chk, n_frac, n_six);
    check(n_fb > 0, "crossbar feedback used");
    check(n_reg > 0, "registered outputs used");
    check(n_mux4_chk > 0 && n_lut_chk > 0, "both LE kinds checked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
