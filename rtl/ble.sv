// Nonfracturable basic logic element (BLE): six inputs, one output.
//
// The LE is a MUX4 (IS_MUX4 = 1) or a 6-LUT (IS_MUX4 = 0), followed by an
// optional flip-flop: the last configuration bit selects the registered or
// the combinational LE output.  The flip-flop loads the LE output on every
// rising clk edge and clears asynchronously on rst_n low.
//
// cfg layout (LSB first): LE cells (4 inversion cells or 64 truth-table
// cells), then the register-use bit at cfg[CFG_W-1].  Six inputs, one
// output and the optional register follow the document; the reset and the
// register-use bit are this design's choice.
module ble
  import hybrid_pkg::*;
#(
  parameter bit          IS_MUX4 = 1'b0,
  parameter int unsigned CFG_W   = ble_cfg_w(IS_MUX4)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LUT_K-1:0]   ble_in,
  input  logic [CFG_W-1:0]   cfg,
  output logic               ble_out
);
  logic le_out;
  logic ff_q;

  if (IS_MUX4) begin : g_mux4
    mux4_le u_le (.le_in(ble_in), .inv_cfg(cfg[MUX4_BITS-1:0]), .le_out(le_out));
  end else begin : g_lut
    lut6 #(.K(LUT_K)) u_le (.le_in(ble_in), .truth_cfg(cfg[LUT_BITS-1:0]), .le_out(le_out));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ff_q <= 1'b0;
    else        ff_q <= le_out;

  always_comb ble_out = cfg[CFG_W-1] ? ff_q : le_out;
endmodule
