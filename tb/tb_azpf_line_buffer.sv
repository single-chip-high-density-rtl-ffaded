// tb_azpf_line_buffer: writes lines of several lengths into a 16-sample
// line buffer, reads the pairs back, and checks line_full / line_pairs,
// the drop of a line that arrives while the buffer is held (overrun), the
// restart on an early adc_sol, and the one-clock read latency.
module tb_azpf_line_buffer;
  localparam int NS = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_valid = 0, adc_sol = 0;
  logic [7:0] adc_data = 0;
  logic [4:0] cfg_ns = 5'd16;
  logic line_full, line_release = 0, overrun, rd_en = 0;
  logic [3:0] line_pairs;
  logic [2:0] rd_addr = 0;
  logic [15:0] rd_data;
  int checks = 0, failures = 0, n_over = 0;

  azpf_line_buffer #(.NS(NS)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && overrun) n_over++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int x[], input int ns);
    cfg_ns = 5'(ns);
    foreach (x[n]) begin
      @(negedge clk);
      adc_valid = 1; adc_sol = (n == 0); adc_data = 8'(x[n]);
    end
    @(negedge clk); adc_valid = 0; adc_sol = 0;
  endtask

  task automatic readback(input int x[], input int np);
    for (int p = 0; p < np; p++) begin
      @(negedge clk); rd_en = 1; rd_addr = 3'(p);
      @(negedge clk); rd_en = 0;
      check(rd_data == {8'(x[2*p+1]), 8'(x[2*p])},
            $sformatf("pair %0d: %h", p, rd_data));
      @(negedge clk);
      check(rd_data == {8'(x[2*p+1]), 8'(x[2*p])}, "read data holds");
    end
  endtask

  task automatic release_buf();
    @(negedge clk); line_release = 1;
    @(negedge clk); line_release = 0;
    check(!line_full, "release clears line_full");
  endtask

  initial begin
    int a[], b[], c[];
    a = new[12]; b = new[16]; c = new[16];
    foreach (a[k]) a[k] = $urandom_range(0, 255);
    foreach (b[k]) b[k] = $urandom_range(0, 255);
    foreach (c[k]) c[k] = $urandom_range(0, 255);
    repeat (3) @(negedge clk); rst_n = 1;
    check(!line_full, "empty after reset");
    send(a, 12);
    check(line_full && line_pairs == 6, $sformatf("short line: full=%0d pairs=%0d", line_full, line_pairs));
    readback(a, 6);
    send(b, 16);                                  // buffer held: dropped
    check(n_over == 1, "overrun pulse");
    check(line_pairs == 6, "held line untouched");
    readback(a, 6);
    release_buf();
    // early restart: 6 samples of c, then the full line b
    begin
      int part[];
      part = new[6];
      foreach (part[k]) part[k] = c[k];
      cfg_ns = 5'd16;
      foreach (part[n]) begin
        @(negedge clk); adc_valid = 1; adc_sol = (n == 0); adc_data = 8'(part[n]);
      end
      @(negedge clk); adc_valid = 0; adc_sol = 0;
      check(!line_full, "partial line not full");
    end
    send(b, 16);
    check(line_full && line_pairs == 8, "full line after restart");
    readback(b, 8);
    check(n_over == 1, "no extra overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
