// Configuration memory of a logic block, loaded as a serial scan chain.
//
// The W configuration cells (LE inversion cells, LUT truth tables,
// register-use bits, crossbar selects) form one shift register.  While
// cfg_en is high each rising clk edge shifts cfg_in into cfg_bits[0] and
// moves every bit one place up; cfg_out is cfg_bits[W-1].  After W shifts
// the first bit sent sits in cfg_bits[W-1], so a host sends the image MSB
// first.  cfg_rst_n (power-on clear, separate from the user reset of the
// BLE flip-flops) clears all cells.  The document only counts the SRAM cells;
// the serial loading and the reset are this design's choice.
module config_chain #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         cfg_rst_n,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic [W-1:0] cfg_bits,
  output logic         cfg_out
);
  always_ff @(posedge clk or negedge cfg_rst_n)
    if (!cfg_rst_n)      cfg_bits <= '0;
    else if (cfg_en) cfg_bits <= {cfg_bits[W-2:0], cfg_in};

  always_comb cfg_out = cfg_bits[W-1];
endmodule
