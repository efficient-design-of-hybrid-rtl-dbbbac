// Fracturable 6-LUT in the style of an adaptive LUT.
//
// The 64-cell truth table is split into two 5-input LUT halves.  In 6-LUT
// mode (frac_cfg = 0) both halves read le_in[4:0] and le_in[5] picks the
// lower (0) or upper (1) half, so le_out[0] = truth_cfg[le_in[5:0]].  In
// fractured mode (frac_cfg = 1) the halves are two independent 5-LUTs:
//   le_out[0] = truth_cfg[le_in[4:0]]                     (cells  31:0)
//   le_out[1] = truth_cfg[32 + {le_in[7:5], le_in[1:0]}]  (cells 63:32)
// They share le_in[1:0].  le_out[1] always shows the upper half.
// The document asks for an 8-input, 2-output fracturable LUT that emulates
// an adaptive LUT; which inputs are shared is this design's choice.
// Combinational.
module frac_lut6 (
  input  logic [7:0]  le_in,
  input  logic [63:0] truth_cfg,
  input  logic        frac_cfg,
  output logic [1:0]  le_out
);
  logic [4:0] addr_b;
  logic       f_lo, f_hi;

  always_comb addr_b = frac_cfg ? {le_in[7:5], le_in[1:0]} : le_in[4:0];

  lut6 #(.K(5)) u_lo (.le_in(le_in[4:0]), .truth_cfg(truth_cfg[31:0]),  .le_out(f_lo));
  lut6 #(.K(5)) u_hi (.le_in(addr_b),     .truth_cfg(truth_cfg[63:32]), .le_out(f_hi));

  always_comb begin
    le_out[0] = (!frac_cfg && le_in[5]) ? f_hi : f_lo;
    le_out[1] = f_hi;
  end
endmodule
