// tb_azpf_halfband: random range lines are demodulated in the testbench
// and fed pair by pair (plus 3 flush steps) into the half-band filter; the
// filtered I/Q line is compared with azpf_ref_pkg::baseband. Also checks
// that out_valid skips the first 3 steps, that clear restarts the line,
// and a full-scale alternating input (largest Q sum).
module tb_azpf_halfband;
  import azpf_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, clear = 0, in_step = 0;
  logic signed [9:0] in_i = 0, in_q = 0, out_i, out_q;
  logic out_valid;
  int checks = 0, failures = 0;

  azpf_halfband dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit st, input bit clr, input int vi, input int vq);
    @(negedge clk);
    in_step = st; clear = clr; in_i = 10'(vi); in_q = 10'(vq); ce = 1;
    @(negedge clk); ce = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int line = 0; line < 12; line++) begin
      int np, x[], bi[], bq[], k;
      np = 8 + $urandom_range(0, 40);
      x = new[2*np];
      foreach (x[s]) x[s] = $urandom_range(0, 255);
      if (line == 0) foreach (x[s]) x[s] = ((s / 2) % 2 == s % 2) ? 255 : 0;
      baseband(x, bi, bq);
      step(0, 1, 0, 0);
      k = 0;
      for (int p = 0; p < np + 3; p++) begin
        int vi, vq, sg;
        sg = (p % 2 == 0) ? 1 : -1;
        vi = (p < np) ? (x[2*p] - 128) * sg : 0;
        vq = (p < np) ? -(x[2*p+1] - 128) * sg : 0;
        step(1, 0, vi, vq);
        checks++;
        if (out_valid != (p >= 3)) begin failures++; $display("FAIL: valid at step %0d", p); end
        if (out_valid) begin
          checks++;
          if (int'(out_i) != bi[k] || int'(out_q) != bq[k]) begin
            failures++;
            if (failures < 10) $display("FAIL: line %0d bin %0d got %0d/%0d exp %0d/%0d", line, k, out_i, out_q, bi[k], bq[k]);
          end
          k++;
        end
      end
      checks++;
      if (k != np) begin failures++; $display("FAIL: %0d outputs for %0d pairs", k, np); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
