// Fracturable hybrid complex logic block (CLB).
//
// N_IN = 80 CLB inputs and the 2*N_BLE = 20 BLE outputs feed a 50%
// depopulated crossbar, which drives the eight inputs of each of the ten
// fracturable BLEs.  BLEs 0..N_MUX4-1 hold a Dual MUX4, the rest a
// fracturable 6-LUT (one 6-LUT or two 5-LUTs); every BLE output has an
// optional flip-flop.  The default MUX4:LUT ratio is 2:8, the ratio the
// document reports as best on the VTR benchmarks for this architecture.
//
// All configuration cells form one serial chain (see config_chain):
//   cfg_bits[XBAR_W-1:0]                      crossbar selects, pin p =
//                                             BLE p/8 input p%8
//   cfg_bits[XBAR_W + ble_cfg_off(i) +: w_i]  BLE i (see frac_ble)
// clb_out[2i+1:2i] are the two outputs of BLE i.  As in hybrid_clb, a
// configuration must not close an unregistered loop through the feedback;
// lint tools report the feedback path as a combinational loop, which stands
// because the feedback is part of the architecture.  While cfg_rst_n is low
// or cfg_en is high the feedback into the crossbar is held at 0.
// Resets: cfg_rst_n clears the configuration cells (power-on), rst_n only
// the BLE flip-flops, so user logic can be reset without reloading.
// Timing: combinational from clb_in to clb_out except through enabled
// flip-flops, which update on the rising clk edge.  Sizes follow the
// document; chain order, MUX4 placement and reset are this design's choice.
module hybrid_frac_clb
  import hybrid_pkg::*;
#(
  parameter int unsigned N_IN   = 80,
  parameter int unsigned N_BLE  = 10,
  parameter int unsigned N_MUX4 = 2,
  parameter int unsigned STRIDE = 2,
  // derived
  parameter int unsigned N_SRC  = N_IN + 2 * N_BLE,
  parameter int unsigned N_PIN  = N_BLE * FRAC_BLE_IN,
  parameter int unsigned SEL_W  = xbar_sel_w(N_SRC, STRIDE),
  parameter int unsigned XBAR_W = N_PIN * SEL_W,
  parameter int unsigned CFG_W  = XBAR_W + ble_cfg_off(N_BLE, N_MUX4, 1'b1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_rst_n,
  input  logic               cfg_en,
  input  logic               cfg_in,
  output logic               cfg_out,
  input  logic [N_IN-1:0]    clb_in,
  output logic [2*N_BLE-1:0] clb_out
);
  logic [CFG_W-1:0] cfg_bits;
  logic [N_PIN-1:0] pin;
  logic [2*N_BLE-1:0] fb;   // BLE outputs as seen by the crossbar

  config_chain #(.W(CFG_W)) u_cfg (
    .clk, .cfg_rst_n, .cfg_en, .cfg_in, .cfg_bits, .cfg_out
  );

  xbar #(.N_SRC(N_SRC), .N_PIN(N_PIN), .STRIDE(STRIDE), .SEL_W(SEL_W)) u_xbar (
    .src({fb, clb_in}), .sel_cfg(cfg_bits[XBAR_W-1:0]), .pin
  );

  // The feedback is held at 0 during the configuration clear and while the
  // chain shifts, so neither power-up contents nor a half-loaded image can
  // close a loop through unregistered BLEs.
  always_comb fb = (cfg_en || !cfg_rst_n) ? '0 : clb_out;

  for (genvar i = 0; i < N_BLE; i++) begin : g_ble
    localparam bit          IS_M = (i < N_MUX4);
    localparam int unsigned W    = frac_ble_cfg_w(IS_M);
    localparam int unsigned OFF  = XBAR_W + ble_cfg_off(i, N_MUX4, 1'b1);
    frac_ble #(.IS_MUX4(IS_M), .CFG_W(W)) u_ble (
      .clk, .rst_n,
      .ble_in (pin[i*FRAC_BLE_IN +: FRAC_BLE_IN]),
      .cfg    (cfg_bits[OFF +: W]),
      .ble_out(clb_out[2*i +: 2])
    );
  end
endmodule
