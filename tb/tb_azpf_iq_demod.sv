// tb_azpf_iq_demod: random sample pairs through the quarter-rate
// demodulator, compared with I = s(2p)(-1)^p, Q = -s(2p+1)(-1)^p,
// s = code - 128; padding steps must give zeros, and outputs must change
// only on clock-enable clocks.
module tb_azpf_iq_demod;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic in_step = 0, in_real = 0, in_odd_pair = 0;
  logic [15:0] in_pair = 0;
  logic out_step;
  logic signed [9:0] out_i, out_q;
  int checks = 0, failures = 0;

  azpf_iq_demod dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int e, o, ei, eq, sg;
      bit real_s, odd;
      logic signed [9:0] hold_i;
      e = $urandom_range(0, 255); o = $urandom_range(0, 255);
      if (t < 4) begin e = (t % 2) ? 0 : 255; o = (t % 2) ? 255 : 0; end
      real_s = ($urandom_range(0, 9) != 0);
      odd = $urandom_range(0, 1);
      @(negedge clk);
      in_step = 1; in_real = real_s; in_odd_pair = odd; in_pair = {8'(o), 8'(e)};
      hold_i = out_i;
      ce = 0;
      @(negedge clk);
      checks++; if (out_i !== hold_i) begin failures++; $display("FAIL: changed without ce"); end
      ce = 1;
      @(negedge clk); ce = 0;
      sg = odd ? -1 : 1;
      ei = real_s ? (e - 128) * sg : 0;
      eq = real_s ? -(o - 128) * sg : 0;
      checks++;
      if (!out_step || int'(out_i) != ei || int'(out_q) != eq) begin
        failures++;
        if (failures < 10) $display("FAIL: e=%0d o=%0d odd=%0d got %0d/%0d exp %0d/%0d", e, o, odd, out_i, out_q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
