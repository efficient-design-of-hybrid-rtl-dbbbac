// Self-checking testbench for mux4_le: every one of the 64 input patterns
// under every one of the 16 inversion settings, compared with d[s]^inv[s].
// It also checks the paper's claim that the element realizes any 2-input
// function (two variables on the selects, constants on the data pins) and
// any 3-input function f(a,b,c): a,b on the selects and each cofactor of f
// about a,b (0, 1, c or not c) made from a data pin tied to 0 or to c and
// its inversion cell.
module tb_mux4_le;
  import hybrid_ref_pkg::*;
  logic [5:0] le_in;
  logic [3:0] inv_cfg;
  logic       le_out;
  int checks = 0, failures = 0;

  mux4_le dut (.le_in, .inv_cfg, .le_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++)
      for (int v = 0; v < 64; v++) begin
        inv_cfg = 4'(c); le_in = 6'(v);
        #1;
        checks++;
        if (le_out !== ref_mux4(le_in, inv_cfg)) begin
          failures++;
          $display("FAIL inv=%h in=%h out=%b", inv_cfg, le_in, le_out);
        end
      end
    // any 2-input function f(a,b): a,b on the selects, f(a,b) as a constant
    // on data pin {b,a}.  Constant 1 is a grounded pin inverted.
    for (int f = 0; f < 16; f++)
      for (int ab = 0; ab < 4; ab++) begin
        inv_cfg = 4'(f);              // data pins held at 0, inversion = table
        le_in = {2'(ab), 4'b0000};
        #1;
        checks++;
        if (le_out !== f[ab]) begin
          failures++;
          $display("FAIL 2-input function %h at %0d", f, ab);
        end
      end
    // any 3-input function f(a,b,c), truth table index {c,b,a}
    for (int f = 0; f < 256; f++) begin
      logic [3:0] use_c, inv;
      for (int ab = 0; ab < 4; ab++) begin
        automatic logic g0 = f[ab];        // f with c = 0
        automatic logic g1 = f[4 + ab];    // f with c = 1
        use_c[ab] = (g0 != g1);
        inv[ab]   = g0;                    // constant g0, or c inverted if g0 = 1
      end
      inv_cfg = inv;
      for (int v = 0; v < 8; v++) begin
        automatic logic c = v[2];
        le_in = {v[1], v[0], use_c[3] & c, use_c[2] & c, use_c[1] & c, use_c[0] & c};
        #1;
        checks++;
        if (le_out !== f[v]) begin
          failures++;
          $display("FAIL 3-input function %h at %0d", f, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
