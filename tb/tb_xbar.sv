// Self-checking testbench for xbar at the nonfracturable CLB size (50
// sources, 60 pins, 50% depopulated): random selects and sources; each pin
// must carry source sel*2 + pin%2, and source 0 for selects past the end.
module tb_xbar;
  localparam int N_SRC = 50, N_PIN = 60, SEL_W = 5;
  logic [N_SRC-1:0]       src;
  logic [N_PIN*SEL_W-1:0] sel_cfg;
  logic [N_PIN-1:0]       pin;
  int checks = 0, failures = 0;

  xbar #(.N_SRC(N_SRC), .N_PIN(N_PIN), .STRIDE(2)) dut (.src, .sel_cfg, .pin);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int p = 0; p < N_PIN; p++) sel_cfg[p*SEL_W +: SEL_W] = SEL_W'($urandom_range(31));
      src = {$urandom, $urandom};
      #1;
      for (int p = 0; p < N_PIN; p++) begin
        automatic int k = int'(sel_cfg[p*SEL_W +: SEL_W]);
        automatic int s = k * 2 + p % 2;
        automatic logic exp_v = (s < N_SRC) ? src[s] : src[0];
        checks++;
        if (pin[p] !== exp_v) begin
          failures++;
          $display("FAIL pin %0d sel %0d", p, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
