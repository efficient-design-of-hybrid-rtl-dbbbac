// Dual MUX4: the fracturable MUX4 element of the 8-input, 2-output BLE.
//
// Two MUX4 elements (see mux4_le) share their select inputs.  Eight BLE
// pins cannot give two six-input elements their own pins, so besides the
// selects they also share two data pins: MUX A reads data pins 0..3, MUX B
// data pins 2..5.  Used unfractured, MUX A alone is an ordinary MUX4 on
// le_out[0].  The document names this element and its size; the pin
// sharing is this design's choice.
//
// Interface: le_in[7:6] = shared selects s0,s1; le_in[3:0] data of A;
// le_in[5:2] data of B; inv_cfg[3:0] inversion cells of A, [7:4] of B.
// Combinational.
module dual_mux4 (
  input  logic [7:0] le_in,
  input  logic [7:0] inv_cfg,
  output logic [1:0] le_out
);
  mux4_le u_mux_a (.le_in({le_in[7:6], le_in[3:0]}), .inv_cfg(inv_cfg[3:0]), .le_out(le_out[0]));
  mux4_le u_mux_b (.le_in({le_in[7:6], le_in[5:2]}), .inv_cfg(inv_cfg[7:4]), .le_out(le_out[1]));
endmodule
