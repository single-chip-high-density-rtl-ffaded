// tb_azpf_controller: runs the line sequencer (NS = 16, 8 pairs per line)
// against a model line buffer and coefficient store. Per line it checks the
// read addresses 0..np-1, the number of demodulator and flush steps, one
// clear, the coefficient addresses i*M + j, the latched coefficients, the
// first/dump/emit/base flags, the line processing time in clock-enable
// periods, and the release handshake. It also switches M (restart and
// mode_switch pulse), clamps cfg_log2m = 7 to M = 32, and checks out_line.
module tb_azpf_controller;
  import azpf_pkg::*;
  localparam int NS = 16, DIV = 4;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [2:0] cfg_log2m = 3'd2, cfg_shift = 3'd5;
  logic line_full = 0, line_release, rd_en, s1_step, s1_real, s1_odd, clear;
  logic [3:0] line_pairs = 4'd8;
  logic [2:0] rd_addr;
  logic [3:0][6:0] coef_addr;
  logic [3:0][7:0] coef_data;
  line_ctx_t ctx;
  logic busy, mode_switch;
  logic [15:0] out_line;
  int checks = 0, failures = 0;

  azpf_controller #(.NS(NS)) dut (.*);
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin cyc++; end
  always @(negedge clk) ce = (cyc % DIV == 0);
  always_comb for (int i = 0; i < 4; i++) coef_data[i] = 8'(coef_addr[i] + 1);

  // counters of what the controller issues
  int n_rd = 0, n_step = 0, n_real = 0, n_clear = 0, n_ce = 0, n_sw = 0, bad_addr = 0, bad_odd = 0;
  int exp_addr = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy && ce) n_ce++;
    if (rd_en) begin
      if (int'(rd_addr) != exp_addr) bad_addr++;
      exp_addr++; n_rd++;
    end
    if (ce && s1_step) begin
      n_step++;
      if (s1_odd != ((n_step - 1) % 2 == 1)) bad_odd++;
    end
    if (ce && s1_real) n_real++;
    if (ce && clear) n_clear++;
    if (mode_switch) n_sw++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_line(input int np, input int m, input int j, input int b, input bit sw);
    int sw0;
    sw0 = n_sw;
    n_rd = 0; n_step = 0; n_real = 0; n_clear = 0; n_ce = 0; exp_addr = 0; bad_addr = 0; bad_odd = 0;
    @(negedge clk); line_full = 1; line_pairs = 4'(np);
    while (!clear) @(negedge clk);
    for (int i = 0; i < 4; i++)
      check(int'(coef_addr[i]) == i*m + j, $sformatf("coef addr %0d = %0d", i, coef_addr[i]));
    check(ctx.first == (j == 0) && ctx.dump == (j == m - 1) && ctx.emit == (b >= 3)
          && int'(ctx.base) == b % 4 && ctx.shift == cfg_shift, "line flags");
    while (!line_release) @(negedge clk);
    for (int i = 0; i < 4; i++)
      check(int'(ctx.coef[i]) == ((i*m + j + 1) & 255), "latched coefficient");
    line_full = 0;
    @(negedge clk);
    check(!busy, "idle after release");
    check(n_rd == np && bad_addr == 0, $sformatf("reads %0d bad %0d", n_rd, bad_addr));
    check(n_step == np + 3 && n_real == np && bad_odd == 0, $sformatf("steps %0d real %0d", n_step, n_real));
    check(n_clear == 1, "one clear");
    check(n_ce >= np + 9 && n_ce <= np + 11, $sformatf("line took %0d ce periods", n_ce));
    check((n_sw != sw0) == sw, "mode switch pulse");
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int lines;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    // M = 4 (reset default): 5 blocks
    for (int n = 0; n < 20; n++) do_line(8, 4, n % 4, n / 4, 1'b0);
    check(out_line == 2, $sformatf("out_line %0d", out_line));
    // switch to M = 2 after a partial block
    cfg_log2m = 3'd1;
    for (int n = 0; n < 9; n++) do_line(n % 2 ? 8 : 5, 2, n % 2, n / 2, n == 0);
    // clamp 7 -> 32
    cfg_log2m = 3'd7; cfg_shift = 3'd2;
    for (int n = 0; n < 3; n++) do_line(8, 32, n, 0, n == 0);
    check(out_line == 3, $sformatf("out_line %0d", out_line));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
