// tb_azpf_workload: the two verification data sets of the AzPF at the
// default size, M = 4, Hamming taps:
//   A) 30 range lines of 52 samples (short lines, cfg_ns = 52);
//   B) 2000 range lines of 8192 samples made from set A by padding with
//      zero (offset code 128) samples and lines, fed in real time with a
//      new line every 50,000 clocks (2 kHz PRF at 100 MHz).
// The 52-sample content is random. Every output sample of both runs is
// compared bit-exactly with azpf_ref_pkg; set B must drop no line.
module tb_azpf_workload;
  import azpf_ref_pkg::*;
  localparam int NS = 8192, PRI = 50000, SHIFT = 4;
  localparam int LA = 30, SA = 52, LB = 2000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        adc_valid = 1'b0, adc_sol = 1'b0;
  logic [7:0]  adc_data = '0;
  logic [13:0] cfg_ns = 14'(SA);
  logic [2:0]  cfg_log2m = 3'd2, cfg_shift = 3'(SHIFT);
  logic        coef_we = 1'b0;
  logic [6:0]  coef_addr = '0;
  logic [7:0]  coef_data = '0;
  logic        out_valid, busy, line_dropped, mode_switch;
  logic [11:0] out_bin;
  logic signed [11:0] out_i, out_q;
  logic [15:0] out_line;

  azpf_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int cap_i[$], cap_q[$], cap_bin[$];
  int n_drop = 0, n_nonzero = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      cap_i.push_back(int'(out_i)); cap_q.push_back(int'(out_q)); cap_bin.push_back(int'(out_bin));
    end
    if (line_dropped) n_drop++;
  end

  initial begin
    repeat (LB * PRI + 3 * LA * 1000 + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h[16];
  int setA [LA][SA];
  typedef int arr_t[];
  arr_t hist_i[$], hist_q[$];

  task automatic setup();
    rst_n = 1'b0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    foreach (h[k]) begin
      @(negedge clk); coef_we = 1; coef_addr = 7'(k); coef_data = 8'(h[k]);
    end
    @(negedge clk); coef_we = 0;
    hist_i.delete(); hist_q.delete();
  endtask

  // feed one line, wait for its end of processing (or a fixed interval),
  // and check the output line against the reference
  task automatic line(input int n, input int x[], input int ns, input int pri);
    int bi[], bq[];
    cap_i.delete(); cap_q.delete(); cap_bin.delete();
    cfg_ns = 14'(ns);
    for (int s = 0; s < ns; s++) begin
      @(negedge clk); adc_valid = 1; adc_sol = (s == 0); adc_data = 8'(x[s]);
    end
    @(negedge clk); adc_valid = 0; adc_sol = 0;
    if (pri > 0) repeat (pri - ns - 1) @(negedge clk);
    else begin
      repeat (20) @(negedge clk);
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
    end
    check(!busy, "line not finished in time");
    baseband(x, bi, bq);
    hist_i.push_back(bi); hist_q.push_back(bq);
    if (hist_i.size() > 16) begin void'(hist_i.pop_front()); void'(hist_q.pop_front()); end
    if ((n + 1) % 4 == 0 && n + 1 >= 16) begin
      check(cap_i.size() == ns / 2, $sformatf("line %0d: %0d outputs", n, cap_i.size()));
      for (int r = 0; r < ns / 2 && r < cap_i.size(); r++) begin
        int xi[16], xq[16], ei, eq;
        for (int t = 0; t < 16; t++) begin xi[t] = hist_i[t][r]; xq[t] = hist_q[t][r]; end
        ei = az_out(xi, h, SHIFT);
        eq = az_out(xq, h, SHIFT);
        if (ei != 0 || eq != 0) n_nonzero++;
        check(cap_bin[r] == r && cap_i[r] == ei && cap_q[r] == eq,
              $sformatf("line %0d bin %0d got %0d/%0d exp %0d/%0d", n, r, cap_i[r], cap_q[r], ei, eq));
      end
    end else begin
      check(cap_i.size() == 0, "unexpected output");
    end
  endtask

  initial begin
    int nzA;
    foreach (h[k]) h[k] = int'(127.0 * (0.54 - 0.46 * $cos(2.0 * 3.14159265 * k / 15.0)));
    foreach (setA[l, s]) setA[l][s] = int'($urandom_range(0, 255));
    // set A
    setup();
    for (int n = 0; n < LA; n++) begin
      int x[];
      x = new[SA];
      foreach (x[s]) x[s] = setA[n][s];
      line(n, x, SA, 0);
    end
    check(out_line == 4, $sformatf("set A: %0d output lines", out_line));
    nzA = n_nonzero;
    check(nzA > 0, "set A produced only zeros");
    // set B
    setup();
    for (int n = 0; n < LB; n++) begin
      int x[];
      x = new[NS];
      foreach (x[s]) x[s] = (n < LA && s < SA) ? setA[n][s] : 128;
      line(n, x, NS, PRI);
    end
    check(n_drop == 0, "lines dropped in set B");
    check(out_line == (LB - 12) / 4, $sformatf("set B: %0d output lines", out_line));
    $display("set A nonzero outputs %0d, set B nonzero outputs %0d, output lines %0d",
             nzA, n_nonzero - nzA, out_line);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
