// tb_azpf_top: end-to-end test of the AzPF at a reduced line length
// (NS = 64 samples, 32 range bins) over every decimation factor
// M = 1, 2, 4, 8, 16, 32.
//
// Random ADC lines are fed through the full design and every output sample
// is compared with azpf_ref_pkg. Exercised and counted: each value of M,
// switches of M (the filter restarts), lines shorter than NS (cfg_ns),
// warm-up dumps that must produce no output, complete output lines, and a
// line that arrives while the previous one is still being processed and must
// be dropped. The processing time of every line is checked against
// (NS/2 + 9..10) processing periods.
module tb_azpf_top;
  import azpf_ref_pkg::*;

  localparam int NS  = 64;
  localparam int DIV = 8;
  localparam int NP  = NS / 2;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        adc_valid = 1'b0, adc_sol = 1'b0;
  logic [7:0]  adc_data = '0;
  logic [6:0]  cfg_ns = 7'(NS);
  logic [2:0]  cfg_log2m = 3'd2, cfg_shift = 3'd0;
  logic        coef_we = 1'b0;
  logic [6:0]  coef_addr = '0;
  logic [7:0]  coef_data = '0;
  logic        out_valid, busy, line_dropped, mode_switch;
  logic [4:0]  out_bin;
  logic signed [11:0] out_i, out_q;
  logic [15:0] out_line;

  azpf_top #(.NS(NS), .CE_DIV(DIV)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // captured outputs
  int cap_i[$], cap_q[$], cap_bin[$];
  int n_drop = 0, n_switch = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      cap_i.push_back(int'(out_i));
      cap_q.push_back(int'(out_q));
      cap_bin.push_back(int'(out_bin));
    end
    if (rst_n && line_dropped) n_drop++;
    if (rst_n && mode_switch)  n_switch++;
  end

  int busy_len = 0, last_busy_len = 0;
  always @(posedge clk) begin
    if (busy) busy_len++;
    else if (busy_len != 0) begin
      last_busy_len = busy_len;
      busy_len = 0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_line(input int x[]);
    for (int n = 0; n < x.size(); n++) begin
      @(negedge clk);
      adc_valid = 1'b1;
      adc_sol   = (n == 0);
      adc_data  = 8'(x[n]);
    end
    @(negedge clk);
    adc_valid = 1'b0;
    adc_sol   = 1'b0;
  endtask

  task automatic wait_idle();
    int guard = 0;
    do begin @(negedge clk); guard++; end while (!busy && guard < 20);
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  task automatic write_coefs(input int h[]);
    foreach (h[k]) begin
      @(negedge clk);
      coef_we   = 1'b1;
      coef_addr = 7'(k);
      coef_data = 8'(h[k]);
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // per-mode history of baseband lines
  typedef int arr_t[];
  arr_t hist_i[$], hist_q[$];

  int n_mode [6] = '{0, 0, 0, 0, 0, 0};
  int n_short = 0, n_warm = 0, n_outlines = 0, n_timed = 0;

  task automatic run_mode(input int log2m, input int nlines, input int ns,
                          input int shift, input int drop_at);
    int m, taps, prev_sw;
    int h[];
    m    = 1 << log2m;
    taps = 4 * m;
    h    = new[taps];
    foreach (h[k]) begin
      // Hamming-shaped taps with some random ripple, 8-bit signed
      real w;
      w = 0.54 - 0.46 * $cos(2.0 * 3.14159265 * k / (taps - 1));
      h[k] = int'(w * 100.0) + int'($urandom_range(0, 40)) - 20;
      if ($urandom_range(0, 7) == 0) h[k] = -h[k];
    end
    write_coefs(h);
    cfg_log2m = 3'(log2m);
    cfg_shift = 3'(shift);
    cfg_ns    = 7'(ns);
    hist_i.delete();
    hist_q.delete();
    prev_sw = n_switch;
    for (int n = 0; n < nlines; n++) begin
      int x[], bi[], bq[];
      x = new[ns];
      foreach (x[s]) x[s] = int'($urandom_range(0, 255));
      cap_i.delete(); cap_q.delete(); cap_bin.delete();
      send_line(x);
      if (n == drop_at) begin
        int y[];
        int d0;
        d0 = n_drop;
        y = new[ns];
        foreach (y[s]) y[s] = int'($urandom_range(0, 255));
        send_line(y);                       // arrives while busy: dropped
        repeat (2) @(negedge clk);
        check(n_drop == d0 + 1, "second line while busy not dropped");
      end
      wait_idle();
      if (n == 0) check((n_switch != prev_sw) == (log2m != 2 || prev_sw != 0),
                        "mode switch pulse");
      check(last_busy_len >= (ns/2 + 9) * DIV && last_busy_len <= (ns/2 + 10) * DIV + 2,
            $sformatf("processing time %0d clocks", last_busy_len));
      n_timed++;
      baseband(x, bi, bq);
      hist_i.push_back(bi);
      hist_q.push_back(bq);
      if ((n + 1) % m == 0 && n + 1 >= taps) begin
        check(cap_i.size() == ns / 2, $sformatf("output line size %0d", cap_i.size()));
        for (int r = 0; r < ns / 2 && r < cap_i.size(); r++) begin
          int xi[], xq[], ei, eq;
          xi = new[taps];
          xq = new[taps];
          for (int t = 0; t < taps; t++) begin
            xi[t] = hist_i[n - taps + 1 + t][r];
            xq[t] = hist_q[n - taps + 1 + t][r];
          end
          ei = az_out(xi, h, shift);
          eq = az_out(xq, h, shift);
          check(cap_bin[r] == r && cap_i[r] == ei && cap_q[r] == eq,
                $sformatf("M=%0d line %0d bin %0d: got %0d/%0d exp %0d/%0d",
                          m, n, r, cap_i[r], cap_q[r], ei, eq));
        end
        n_outlines++;
      end else begin
        check(cap_i.size() == 0, "output on a line that must not dump");
        if ((n + 1) % m == 0) n_warm++;
      end
      if (ns < NS) n_short++;
    end
    n_mode[log2m]++;
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    run_mode(2, 24, 52, 3, 5);     // M = 4, the 52-sample lines, one drop
    run_mode(0, 8, 64, 0, -1);     // M = 1
    run_mode(1, 12, 64, 1, -1);    // M = 2
    run_mode(3, 40, 52, 4, -1);    // M = 8
    run_mode(4, 72, 64, 5, -1);    // M = 16
    run_mode(5, 132, 64, 6, -1);   // M = 32
    for (int k = 0; k < 6; k++) check(n_mode[k] > 0, "mode not run");
    check(n_switch == 5, $sformatf("mode switches %0d", n_switch));
    check(n_drop == 1, "dropped lines");
    check(n_short > 0 && n_warm > 0 && n_outlines > 0 && n_timed > 0, "mechanism not seen");
    $display("mechanisms: outlines=%0d warmup_dumps=%0d switches=%0d drops=%0d short_lines=%0d out_line=%0d",
             n_outlines, n_warm, n_switch, n_drop, n_short, out_line);
    check(int'(out_line) == n_outlines, "out_line counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
