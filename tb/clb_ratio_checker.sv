// Test harness for one CLB at one MUX4:LUT ratio, used by tb_ratio_sweep.
//
// Instantiates hybrid_clb (FRAC = 0) or hybrid_frac_clb (FRAC = 1) with
// N_MUX4 MUX-type BLEs and checks it against ClbModel: NCFG random images
// are shifted in through the configuration chain, each followed by NCYC
// cycles of random inputs with every output compared.  Results come out on
// checks/failures; done rises when the run is over.
module clb_ratio_checker
  import hybrid_ref_pkg::*;
#(
  parameter bit FRAC   = 1'b0,
  parameter int N_MUX4 = 1,
  parameter int NCFG   = 3,
  parameter int NCYC   = 100
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_fb,
  output logic done
);
  localparam int N_IN  = FRAC ? 80 : 40;
  localparam int N_OUT = FRAC ? 20 : 10;
  logic rst_n = 0, cfg_rst_n = 0, cfg_en = 0, cfg_in, cfg_out;
  logic [N_IN-1:0]  clb_in;
  logic [N_OUT-1:0] clb_out;

  if (FRAC) begin : g_fr
    hybrid_frac_clb #(.N_IN(N_IN), .N_BLE(10), .N_MUX4(N_MUX4)) dut (
      .clk, .rst_n, .cfg_rst_n, .cfg_en, .cfg_in, .cfg_out, .clb_in, .clb_out);
  end else begin : g_nf
    hybrid_clb #(.N_IN(N_IN), .N_BLE(10), .N_MUX4(N_MUX4)) dut (
      .clk, .rst_n, .cfg_rst_n, .cfg_en, .cfg_in, .cfg_out, .clb_in, .clb_out);
  end

  initial begin
    static ClbModel m = new(FRAC, N_IN, 10, N_MUX4);
    logic [127:0] rv;
    bit [31:0] e;
    checks = 0; failures = 0; n_fb = 0; done = 0;
    rst_n = 0; cfg_rst_n = 0; cfg_en = 0; cfg_in = 0; clb_in = '0;
    #12 rst_n = 1; cfg_rst_n = 1;
    for (int c = 0; c < NCFG; c++) begin
      m.randomize_cfg(40);
      n_fb += m.n_fb_pins;
      @(negedge clk);
      for (int b = m.cfg_w - 1; b >= 0; b--) begin
        cfg_en = 1; cfg_in = m.img[b];
        @(negedge clk);
      end
      cfg_en = 0;
      rst_n = 0; #1 rst_n = 1;
      foreach (m.q[k]) m.q[k] = 0;
      for (int t = 0; t < NCYC; t++) begin
        rv = {$urandom, $urandom, $urandom, $urandom};
        clb_in = rv[N_IN-1:0];
        #1;
        e = m.eval(128'(clb_in));
        for (int o = 0; o < N_OUT; o++) begin
          checks++;
          if (clb_out[o] !== e[o]) begin
            failures++;
            if (failures < 5)
              $display("FAIL frac=%0d n_mux4=%0d cfg %0d cycle %0d out %0d", FRAC, N_MUX4, c, t, o);
          end
        end
        @(posedge clk);
        m.clock();
        @(negedge clk);
      end
    end
    done = 1;
  end
endmodule
