// tb_azpf_acc_mem: random writes of all four banks followed by reads;
// checks the one-clock read latency, that read data holds while rd_en is
// low, and that the banks are independent.
module tb_azpf_acc_mem;
  localparam int NBIN = 32;
  logic clk = 1'b0, rd_en = 0, wr_en = 0;
  logic [4:0] rd_addr = 0, wr_addr = 0;
  logic [3:0][31:0] rd_data, wr_data = '0;
  logic [3:0][31:0] model [NBIN];
  int checks = 0, failures = 0;

  azpf_acc_mem #(.NBIN(NBIN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < NBIN; a++) begin
      for (int b = 0; b < 4; b++) model[a][b] = $urandom;
      @(negedge clk); wr_en = 1; wr_addr = 5'(a); wr_data = model[a];
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 300; t++) begin
      int a;
      a = $urandom_range(0, NBIN - 1);
      @(negedge clk); rd_en = 1; rd_addr = 5'(a);
      // overwrite one bank of another bin in the same clock
      wr_en = 1; wr_addr = 5'((a + 1) % NBIN);
      wr_data = model[(a + 1) % NBIN];
      wr_data[t % 4] = $urandom;
      model[(a + 1) % NBIN] = wr_data;
      @(negedge clk); rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data != model[a]) begin failures++; $display("FAIL: addr %0d", a); end
      rd_addr = 5'($urandom_range(0, NBIN - 1));
      @(negedge clk);
      checks++;
      if (rd_data != model[a]) begin failures++; $display("FAIL: hold %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
