// Nonfracturable hybrid complex logic block (CLB).
//
// N_IN = 40 CLB inputs and the N_BLE = 10 BLE outputs feed a 50%
// depopulated crossbar, which drives the six inputs of each of the ten
// BLEs.  BLEs 0..N_MUX4-1 hold a MUX4 element, the rest a 6-LUT; each BLE
// has an optional flip-flop.  The BLE outputs are the CLB outputs and are
// fed back into the crossbar, so one BLE can feed another inside the block.
// The default MUX4:LUT ratio is 4:6, the ratio the document found best on
// its high-level-synthesis benchmarks; it sweeps 1:9 to 5:5.
//
// All configuration cells form one serial chain (see config_chain):
//   cfg_bits[XBAR_W-1:0]                      crossbar selects, pin p =
//                                             BLE p/6 input p%6
//   cfg_bits[XBAR_W + ble_cfg_off(i) +: w_i]  BLE i (see ble)
// The image is shifted in MSB first while cfg_en is high; user logic should
// be run with cfg_en low.  A configuration that closes a loop through BLEs
// without a flip-flop in it forms a combinational loop, as in any FPGA; the
// configuration (the CAD flow) must avoid that.  Because the feedback path
// exists in the netlist, lint tools report it as a combinational loop; it
// stands, since the feedback is part of the architecture.  While cfg_rst_n is
// low or cfg_en is high the feedback into the crossbar is held at 0, so
// power-up contents and partially shifted images cannot oscillate.
//
// Resets: cfg_rst_n clears the configuration cells (power-on), rst_n only
// the BLE flip-flops, so user logic can be reset without reloading.
// Timing: clb_in to clb_out is combinational through the crossbar and the
// LEs; BLEs with their register enabled change on the rising clk edge.
// Sizes follow the document; chain order, MUX4 placement at the low BLE
// indices and the reset are this design's choice.
module hybrid_clb
  import hybrid_pkg::*;
#(
  parameter int unsigned N_IN   = 40,
  parameter int unsigned N_BLE  = 10,
  parameter int unsigned N_MUX4 = 4,
  parameter int unsigned STRIDE = 2,
  // derived
  parameter int unsigned N_SRC  = N_IN + N_BLE,
  parameter int unsigned N_PIN  = N_BLE * LUT_K,
  parameter int unsigned SEL_W  = xbar_sel_w(N_SRC, STRIDE),
  parameter int unsigned XBAR_W = N_PIN * SEL_W,
  parameter int unsigned CFG_W  = XBAR_W + ble_cfg_off(N_BLE, N_MUX4, 1'b0)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_rst_n,
  input  logic             cfg_en,
  input  logic             cfg_in,
  output logic             cfg_out,
  input  logic [N_IN-1:0]  clb_in,
  output logic [N_BLE-1:0] clb_out
);
  logic [CFG_W-1:0] cfg_bits;
  logic [N_PIN-1:0] pin;
  logic [N_BLE-1:0] fb;   // BLE outputs as seen by the crossbar

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
    localparam int unsigned W    = ble_cfg_w(IS_M);
    localparam int unsigned OFF  = XBAR_W + ble_cfg_off(i, N_MUX4, 1'b0);
    ble #(.IS_MUX4(IS_M), .CFG_W(W)) u_ble (
      .clk, .rst_n,
      .ble_in (pin[i*LUT_K +: LUT_K]),
      .cfg    (cfg_bits[OFF +: W]),
      .ble_out(clb_out[i])
    );
  end
endmodule
