// Architecture sweep: both CLB kinds at every MUX4:LUT ratio the study
// evaluates, 1:9 through 5:5, each checked cycle by cycle against the
// reference model by a clb_ratio_checker.  Passes when all ten report no
// failure and each of them used crossbar feedback at least once.
module tb_ratio_sweep;
  logic clk = 0;
  int   chk [10], fl [10], fb [10];
  logic dn  [10];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar r = 1; r <= 5; r++) begin : g_ratio
    clb_ratio_checker #(.FRAC(1'b0), .N_MUX4(r)) u_nf (
      .clk, .checks(chk[r-1]), .failures(fl[r-1]), .n_fb(fb[r-1]), .done(dn[r-1]));
    clb_ratio_checker #(.FRAC(1'b1), .N_MUX4(r)) u_fr (
      .clk, .checks(chk[r+4]), .failures(fl[r+4]), .n_fb(fb[r+4]), .done(dn[r+4]));
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1;
      foreach (dn[i]) all_done &= dn[i];
    end while (!all_done);
    foreach (chk[i]) begin
      $display("%s CLB, %0d MUX4 : %0d LUT: checks=%0d failures=%0d feedback pins=%0d",
               i < 5 ? "nonfracturable" : "fracturable", i % 5 + 1, 10 - (i % 5 + 1), chk[i], fl[i], fb[i]);
      checks += chk[i] + 1;
      failures += fl[i] + (fb[i] == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
