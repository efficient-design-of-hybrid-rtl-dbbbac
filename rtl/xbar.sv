// Depopulated intracluster crossbar.
//
// Every BLE input pin is a multiplexer over a fixed subset of the sources
// (the CLB inputs followed by the fed-back BLE outputs).  With STRIDE = 2
// the crossbar is 50% depopulated, as in the document: pin p reaches
// sources p%2, p%2 + 2, p%2 + 4, ...  Pin p's select field
// sel_cfg[p*SEL_W +: SEL_W] = k picks source k*STRIDE + p%STRIDE; a value
// past the last source picks source 0.  Which half of the sources each pin
// sees is this design's choice.  Combinational.
module xbar
  import hybrid_pkg::*;
#(
  parameter int unsigned N_SRC  = 50,
  parameter int unsigned N_PIN  = 60,
  parameter int unsigned STRIDE = 2,
  parameter int unsigned SEL_W  = xbar_sel_w(N_SRC, STRIDE)
) (
  input  logic [N_SRC-1:0]       src,
  input  logic [N_PIN*SEL_W-1:0] sel_cfg,
  output logic [N_PIN-1:0]       pin
);
  for (genvar p = 0; p < N_PIN; p++) begin : g_pin
    logic [SEL_W-1:0] sel;
    int unsigned      idx;
    always_comb begin
      sel = sel_cfg[p*SEL_W +: SEL_W];
      idx = int'(sel) * STRIDE + (p % STRIDE);
      pin[p] = (idx < N_SRC) ? src[idx] : src[0];
    end
  end
endmodule
