// Shared constants and configuration-layout functions of the hybrid
// LUT/MUX4 logic blocks.
//
// The logic block mixes two kinds of logic element (LE): the conventional
// 6-input lookup table and the MUX4, a 4-to-1 multiplexer with optional
// inversion on its data inputs.  Every configurable cell in a CLB is a bit
// of one serial configuration chain; the functions below give the width of
// each element's slice of that chain so the CLB, its testbenches and the
// top agree on one layout.  The element sizes (6-input LUT, 4 inversion
// cells per MUX4, 40/80-input CLBs of ten BLEs, 50% crossbar) follow the
// document; the serial chain and the bit order are this design's choice.
package hybrid_pkg;

  localparam int unsigned LUT_K       = 6;            // inputs of a LUT / MUX4 LE
  localparam int unsigned LUT_BITS    = 1 << LUT_K;   // truth-table cells of a 6-LUT
  localparam int unsigned MUX4_DATA   = 4;            // data inputs of a MUX4
  localparam int unsigned MUX4_BITS   = MUX4_DATA;    // inversion cells of a MUX4
  localparam int unsigned FRAC_BLE_IN = 8;            // inputs of a fracturable BLE

  // Configuration width of a nonfracturable BLE: LE cells + register-use bit.
  function automatic int unsigned ble_cfg_w(bit is_mux4);
    return (is_mux4 ? MUX4_BITS : LUT_BITS) + 1;
  endfunction

  // Configuration width of a fracturable BLE: LE cells + two register-use
  // bits.  A Dual MUX4 holds two sets of inversion cells; a fracturable
  // LUT holds its 64-cell truth table plus one mode bit.
  function automatic int unsigned frac_ble_cfg_w(bit is_mux4);
    return (is_mux4 ? 2 * MUX4_BITS : LUT_BITS + 1) + 2;
  endfunction

  // Select width of one crossbar pin multiplexer over n_src sources when
  // only every stride-th source is connected.
  function automatic int unsigned xbar_sel_w(int unsigned n_src, int unsigned stride);
    int unsigned opts = (n_src + stride - 1) / stride;
    return (opts <= 1) ? 1 : $clog2(opts);
  endfunction

  // Offset of BLE i inside the BLE part of a CLB chain (MUX4 BLEs first).
  function automatic int unsigned ble_cfg_off(int unsigned i, int unsigned n_mux4, bit frac);
    int unsigned wm = frac ? frac_ble_cfg_w(1'b1) : ble_cfg_w(1'b1);
    int unsigned wl = frac ? frac_ble_cfg_w(1'b0) : ble_cfg_w(1'b0);
    return (i < n_mux4) ? i * wm : n_mux4 * wm + (i - n_mux4) * wl;
  endfunction

endpackage
