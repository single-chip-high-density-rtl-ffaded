// tb_azpf_ce_gen: checks that the clock enable is a single-clock pulse
// exactly every DIV = 8 clocks (100 MHz -> 12.5 MHz) and low in reset.
module tb_azpf_ce_gen;
  logic clk = 1'b0, rst_n = 1'b0, ce;
  int checks = 0, failures = 0;
  azpf_ce_gen dut (.clk, .rst_n, .ce);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n;
    repeat (3) @(posedge clk);
    #1 checks++; if (ce) failures++;          // low in reset
    @(negedge clk) rst_n = 1'b1;
    last = -1; n = 0;
    for (int t = 0; t < 800; t++) begin
      @(posedge clk); #1;
      if (ce) begin
        checks++;
        if (last >= 0 && t - last != 8) begin
          failures++;
          $display("FAIL: ce spacing %0d", t - last);
        end
        last = t; n++;
      end
    end
    checks++;
    if (n != 100) begin failures++; $display("FAIL: %0d enables in 800 clocks", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
