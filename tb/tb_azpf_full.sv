// tb_azpf_full: the AzPF at its default size (8192 samples per range line,
// 4096 range bins, 12.5 MHz processing rate, M = 4 as after reset) fed in
// real time: a new range line starts every 50,000 clocks, the pulse
// interval at 2 kHz PRF with the 100 MHz clock. Random lines are used;
// every output sample of the output lines is compared bit-exactly with
// azpf_ref_pkg. Checks that no line is dropped at this rate, that each
// line is finished before the next one starts, and the processing time.
module tb_azpf_full;
  import azpf_ref_pkg::*;
  localparam int NS = 8192, NP = 4096, DIV = 8, PRI = 50000, LINES = 24;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        adc_valid = 1'b0, adc_sol = 1'b0;
  logic [7:0]  adc_data = '0;
  logic [13:0] cfg_ns = 14'(NS);
  logic [2:0]  cfg_log2m = 3'd2, cfg_shift = 3'd4;
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
  int n_drop = 0, n_sw = 0, busy_len = 0, last_busy_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      cap_i.push_back(int'(out_i)); cap_q.push_back(int'(out_q)); cap_bin.push_back(int'(out_bin));
    end
    if (line_dropped) n_drop++;
    if (mode_switch) n_sw++;
    if (busy) busy_len++;
    else if (busy_len != 0) begin last_busy_len = busy_len; busy_len = 0; end
  end

  initial begin
    repeat ((LINES + 2) * PRI) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int arr_t[];
  arr_t hist_i[$], hist_q[$];

  initial begin
    int h[16];
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    // Hamming window taps, 4M = 16, peak 127
    foreach (h[k]) h[k] = int'(127.0 * (0.54 - 0.46 * $cos(2.0 * 3.14159265 * k / 15.0)));
    foreach (h[k]) begin
      @(negedge clk); coef_we = 1; coef_addr = 7'(k); coef_data = 8'(h[k]);
    end
    @(negedge clk); coef_we = 0;
    for (int n = 0; n < LINES; n++) begin
      int x[], bi[], bq[];
      x = new[NS];
      foreach (x[s]) x[s] = int'($urandom_range(0, 255));
      cap_i.delete(); cap_q.delete(); cap_bin.delete();
      for (int s = 0; s < NS; s++) begin
        @(negedge clk); adc_valid = 1; adc_sol = (s == 0); adc_data = 8'(x[s]);
      end
      @(negedge clk); adc_valid = 0; adc_sol = 0;
      // the rest of the pulse interval
      repeat (PRI - NS - 1) @(negedge clk);
      check(!busy, $sformatf("line %0d not finished within the pulse interval", n));
      check(last_busy_len >= (NP + 9) * DIV && last_busy_len <= (NP + 10) * DIV + 2,
            $sformatf("processing took %0d clocks", last_busy_len));
      baseband(x, bi, bq);
      hist_i.push_back(bi); hist_q.push_back(bq);
      if ((n + 1) % 4 == 0 && n + 1 >= 16) begin
        check(cap_i.size() == NP, $sformatf("output line of %0d samples", cap_i.size()));
        for (int r = 0; r < NP && r < cap_i.size(); r++) begin
          int xi[16], xq[16], ei, eq;
          for (int t = 0; t < 16; t++) begin
            xi[t] = hist_i[n - 15 + t][r];
            xq[t] = hist_q[n - 15 + t][r];
          end
          ei = az_out(xi, h, 4);
          eq = az_out(xq, h, 4);
          check(cap_bin[r] == r && cap_i[r] == ei && cap_q[r] == eq,
                $sformatf("line %0d bin %0d got %0d/%0d exp %0d/%0d", n, r, cap_i[r], cap_q[r], ei, eq));
        end
      end else begin
        check(cap_i.size() == 0, "unexpected output");
      end
    end
    check(n_drop == 0 && n_sw == 0, "no drops or mode switches at the full rate");
    check(out_line == 3, $sformatf("out_line %0d", out_line));
    $display("processing per line: %0d clocks of %0d", last_busy_len, PRI);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
