// tb_azpf_prefilter: drives the poly-phase azimuth filter (8 range bins)
// with random baseband lines and the line context the controller would
// give (coefficient h(i*M+j) per phase, slot base, first/dump/emit), for
// M = 2 and M = 1 and for a product shift of 0 (which saturates) and 3.
// Every output is compared with azpf_ref_pkg::az_out over the last 4M
// lines; lines that must not dump must give no output.
module tb_azpf_prefilter;
  import azpf_pkg::*;
  import azpf_ref_pkg::*;
  localparam int NBIN = 8;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, clear = 0, in_valid = 0;
  line_ctx_t ctx = '0;
  logic signed [9:0] in_i = 0, in_q = 0;
  logic out_valid;
  logic [2:0] out_bin;
  logic signed [11:0] out_i, out_q;
  int checks = 0, failures = 0, n_out = 0, n_sat = 0;
  int cap_i[$], cap_q[$], cap_b[$];

  azpf_prefilter #(.NBIN(NBIN)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && out_valid) begin
    cap_i.push_back(out_i); cap_q.push_back(out_q); cap_b.push_back(out_bin);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit clr, input bit v, input int xi, input int xq);
    @(negedge clk);
    clear = clr; in_valid = v; in_i = 10'(xi); in_q = 10'(xq); ce = 1;
    @(negedge clk); ce = 0;
    repeat (2) @(negedge clk);
  endtask

  typedef int arr_t[];
  task automatic run(input int log2m, input int nlines, input int shift, input int amp);
    int m, taps, h[];
    arr_t hi[$], hq[$];
    m = 1 << log2m; taps = 4 * m;
    h = new[taps];
    foreach (h[k]) h[k] = $urandom_range(0, 255) - 128;
    for (int n = 0; n < nlines; n++) begin
      int j, b, xi[], xq[];
      j = n % m; b = n / m;
      for (int i = 0; i < 4; i++) ctx.coef[i] = 8'(h[i*m + j]);
      ctx.base = 2'(b % 4); ctx.first = (j == 0); ctx.dump = (j == m - 1);
      ctx.emit = (b >= 3); ctx.shift = 3'(shift);
      xi = new[NBIN]; xq = new[NBIN];
      foreach (xi[r]) begin
        xi[r] = $urandom_range(0, 2*amp) - amp;
        xq[r] = $urandom_range(0, 2*amp) - amp;
      end
      hi.push_back(xi); hq.push_back(xq);
      cap_i.delete(); cap_q.delete(); cap_b.delete();
      step(1, 0, 0, 0);
      for (int r = 0; r < NBIN; r++) step(0, 1, xi[r], xq[r]);
      repeat (3) step(0, 0, 0, 0);
      if (ctx.dump && ctx.emit) begin
        checks++;
        if (cap_i.size() != NBIN) begin failures++; $display("FAIL: %0d outputs", cap_i.size()); end
        for (int r = 0; r < NBIN && r < cap_i.size(); r++) begin
          int wi[], wq[], ei, eq;
          wi = new[taps]; wq = new[taps];
          for (int t = 0; t < taps; t++) begin
            wi[t] = hi[n - taps + 1 + t][r];
            wq[t] = hq[n - taps + 1 + t][r];
          end
          ei = az_out(wi, h, shift); eq = az_out(wq, h, shift);
          if (ei == 2047 || ei == -2048) n_sat++;
          checks++;
          if (cap_b[r] != r || cap_i[r] != ei || cap_q[r] != eq) begin
            failures++;
            if (failures < 10) $display("FAIL: M=%0d line %0d bin %0d got %0d/%0d exp %0d/%0d", m, n, r, cap_i[r], cap_q[r], ei, eq);
          end
        end
        n_out++;
      end else begin
        checks++;
        if (cap_i.size() != 0) begin failures++; $display("FAIL: unexpected output line %0d", n); end
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(1, 20, 3, 300);
    run(0, 10, 0, 500);
    checks++;
    if (n_out < 8 || n_sat == 0) begin failures++; $display("FAIL: outputs %0d saturated %0d", n_out, n_sat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
