// Top level: the two hybrid LUT/MUX4 logic block architectures side by side.
//
// u_nf is the nonfracturable CLB (40 inputs, ten 6-input BLEs, 4 MUX4 : 6
// LUT) and u_fr the fracturable CLB (80 inputs, ten 8-input 2-output BLEs,
// 2 Dual MUX4 : 8 fracturable LUT).  The document evaluates each on its own
// in an island-style FPGA whose inter-block routing it does not design, so
// each block's inputs, outputs and configuration chain are brought out as
// ports here (nf_* and fr_*).  Both share clk, the user reset rst_n and the
// configuration clear cfg_rst_n.  Timing is that of
// the two blocks (see hybrid_clb and hybrid_frac_clb).  Lint tools report
// the BLE feedback inside each block as a combinational loop; it stands, as
// explained in hybrid_clb, because the feedback is part of the architecture
// and only a configuration can close it.
module hybrid_fpga_top #(
  parameter int unsigned NF_N_MUX4 = 4,
  parameter int unsigned FR_N_MUX4 = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_rst_n,
  // nonfracturable CLB
  input  logic        nf_cfg_en,
  input  logic        nf_cfg_in,
  output logic        nf_cfg_out,
  input  logic [39:0] nf_in,
  output logic [9:0]  nf_out,
  // fracturable CLB
  input  logic        fr_cfg_en,
  input  logic        fr_cfg_in,
  output logic        fr_cfg_out,
  input  logic [79:0] fr_in,
  output logic [19:0] fr_out
);
  hybrid_clb #(.N_IN(40), .N_BLE(10), .N_MUX4(NF_N_MUX4)) u_nf (
    .clk, .rst_n, .cfg_rst_n, .cfg_en(nf_cfg_en), .cfg_in(nf_cfg_in), .cfg_out(nf_cfg_out),
    .clb_in(nf_in), .clb_out(nf_out)
  );

  hybrid_frac_clb #(.N_IN(80), .N_BLE(10), .N_MUX4(FR_N_MUX4)) u_fr (
    .clk, .rst_n, .cfg_rst_n, .cfg_en(fr_cfg_en), .cfg_in(fr_cfg_in), .cfg_out(fr_cfg_out),
    .clb_in(fr_in), .clb_out(fr_out)
  );
endmodule
