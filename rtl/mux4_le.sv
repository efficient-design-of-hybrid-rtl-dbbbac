// MUX4 logic element.
//
// A six-input LE built around a 4-to-1 multiplexer: four data inputs d0..d3
// and two select inputs s0,s1.  Each data input passes through a 2-to-1 MUX
// that picks the input or its inverse under one configuration cell, so the
// element is seven 2-to-1 MUXs, four inverters and four SRAM cells in all,
// as the document counts it.  All other configuration happens in the routing:
// feeding constants or variables to the data pins and decomposition
// variables to the selects lets the element realize every 2- and 3-input
// function and those 4-, 5- and 6-input functions whose Shannon cofactors
// about two inputs each depend on at most one input.
//
// Function: le_out = d[s] ^ inv_cfg[s], with s = {s1,s0}.
// Interface: le_in[3:0] = d0..d3, le_in[5:4] = s0,s1 (pin order is this
// design's choice); inv_cfg[i] inverts d[i].  Purely combinational.
module mux4_le (
  input  logic [5:0] le_in,
  input  logic [3:0] inv_cfg,
  output logic       le_out
);
  logic [3:0] d_inv;   // inverted data inputs
  logic [3:0] d_sel;   // data after the optional inversion
  logic [1:0] lvl1;    // first level of the 4-to-1 tree

  // Optional inversion: one inverter and one 2-to-1 MUX per data input.
  for (genvar i = 0; i < 4; i++) begin : g_inv
    always_comb d_inv[i] = ~le_in[i];
    mux2 u_inv_mux (.a(le_in[i]), .b(d_inv[i]), .sel(inv_cfg[i]), .y(d_sel[i]));
  end

  // 4-to-1 MUX from three 2-to-1 MUXs.
  mux2 u_m0 (.a(d_sel[0]), .b(d_sel[1]), .sel(le_in[4]), .y(lvl1[0]));
  mux2 u_m1 (.a(d_sel[2]), .b(d_sel[3]), .sel(le_in[4]), .y(lvl1[1]));
  mux2 u_m2 (.a(lvl1[0]),  .b(lvl1[1]),  .sel(le_in[5]), .y(le_out));
endmodule
