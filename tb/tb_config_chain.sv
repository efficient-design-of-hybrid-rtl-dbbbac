// Self-checking testbench for config_chain: after reset the cells read 0;
// a random W-bit image shifted in MSB first must appear in cfg_bits after
// exactly W enabled clocks, hold while cfg_en is low, and come out of
// cfg_out MSB first while the next image is shifted in.
module tb_config_chain;
  localparam int W = 37;
  logic clk = 0, cfg_rst_n, cfg_en, cfg_in, cfg_out;
  logic [W-1:0] cfg_bits, img, img2;
  int checks = 0, failures = 0, cycles = 0;

  config_chain #(.W(W)) dut (.clk, .cfg_rst_n, .cfg_en, .cfg_in, .cfg_bits, .cfg_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int c0;
    cfg_rst_n = 0; cfg_en = 0; cfg_in = 0;
    img  = {$urandom, $urandom};
    img2 = {$urandom, $urandom};
    #12 cfg_rst_n = 1;
    check(cfg_bits == '0, "reset clears cells");
    @(negedge clk);
    c0 = cycles;
    for (int b = W - 1; b >= 0; b--) begin
      cfg_en = 1; cfg_in = img[b];
      @(negedge clk);
    end
    cfg_en = 0;
    check(cycles - c0 == W, "load takes W clocks");
    check(cfg_bits == img, "image loaded");
    repeat (5) @(negedge clk);
    check(cfg_bits == img, "image holds with cfg_en low");
    for (int b = W - 1; b >= 0; b--) begin
      check(cfg_out == img[b], "cfg_out streams old image");
      cfg_en = 1; cfg_in = img2[b];
      @(negedge clk);
    end
    cfg_en = 0;
    check(cfg_bits == img2, "second image loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
