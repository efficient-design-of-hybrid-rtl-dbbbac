// Fracturable basic logic element: eight inputs, two outputs.
//
// The LE is a Dual MUX4 (IS_MUX4 = 1) or a fracturable 6-LUT (IS_MUX4 = 0).
// Each of the two LE outputs has an optional flip-flop selected by its own
// configuration bit; the flip-flops load on every rising clk edge and clear
// asynchronously on rst_n low.
//
// cfg layout (LSB first):
//   Dual MUX4 : [7:0] inversion cells, [8] reg-use out0, [9] reg-use out1
//   frac LUT  : [63:0] truth table, [64] fracture mode, [65] reg-use out0,
//               [66] reg-use out1
// Eight inputs, two outputs and the optional registers follow the document;
// the reset and the bit layout are this design's choice.
module frac_ble
  import hybrid_pkg::*;
#(
  parameter bit          IS_MUX4 = 1'b0,
  parameter int unsigned CFG_W   = frac_ble_cfg_w(IS_MUX4)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [FRAC_BLE_IN-1:0] ble_in,
  input  logic [CFG_W-1:0]       cfg,
  output logic [1:0]             ble_out
);
  logic [1:0] le_out;
  logic [1:0] ff_q;
  logic [1:0] reg_use;

  if (IS_MUX4) begin : g_mux4
    dual_mux4 u_le (.le_in(ble_in), .inv_cfg(cfg[2*MUX4_BITS-1:0]), .le_out(le_out));
  end else begin : g_lut
    frac_lut6 u_le (.le_in(ble_in), .truth_cfg(cfg[LUT_BITS-1:0]),
                    .frac_cfg(cfg[LUT_BITS]), .le_out(le_out));
  end

  always_comb reg_use = cfg[CFG_W-1 -: 2];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ff_q <= '0;
    else        ff_q <= le_out;

  always_comb
    for (int o = 0; o < 2; o++)
      ble_out[o] = reg_use[o] ? ff_q[o] : le_out[o];
endmodule
