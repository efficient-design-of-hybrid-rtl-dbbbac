// 2-to-1 multiplexer, the basic cell in which the MUX4 element is counted
// (seven of them per MUX4, as in the element's area breakdown) and from
// which it is built here.  y = sel ? b : a, purely combinational.
module mux2 (
  input  logic a,
  input  logic b,
  input  logic sel,
  output logic y
);
  always_comb y = sel ? b : a;
endmodule
