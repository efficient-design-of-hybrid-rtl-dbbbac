// K-input lookup table (K = 6 by default), the conventional FPGA LE.
//
// The 2^K configuration cells hold the truth table; the inputs walk a
// binary tree of 2-to-1 multiplexer levels, input 0 at the leaves and input
// K-1 at the root, so le_out = truth_cfg[le_in].  The document describes the
// 6-LUT as a 64-to-1 MUX over 64 SRAM cells with six MUX levels on its
// longest path; the tree form here is that structure.  Combinational.
module lut6 #(
  parameter int unsigned K = 6
) (
  input  logic [K-1:0]      le_in,
  input  logic [(1<<K)-1:0] truth_cfg,
  output logic              le_out
);
  // level[l] holds 2^(K-l) values; level[0] is the truth table itself.
  logic [(1<<K)-1:0] level [K+1];

  always_comb begin
    level[0] = truth_cfg;
    for (int l = 1; l <= K; l++) begin
      level[l] = '0;
      for (int j = 0; j < (1 << (K - l)); j++)
        level[l][j] = le_in[l-1] ? level[l-1][2*j+1] : level[l-1][2*j];
    end
    le_out = level[K][0];
  end
endmodule
