// tb_azpf_coef_ram: writes random 8-bit taps to all 128 addresses and
// reads them back through the four read ports at random addresses; checks
// that reset clears the store.
module tb_azpf_coef_ram;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 0;
  logic [6:0] wr_addr = 0;
  logic [7:0] wr_data = 0;
  logic [3:0][6:0] rd_addr = '0;
  logic [3:0][7:0] rd_data;
  int checks = 0, failures = 0;
  int model [128];

  azpf_coef_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4; i++) rd_addr[i] = 7'($urandom_range(0, 127));
    #1;
    for (int i = 0; i < 4; i++) begin checks++; if (rd_data[i] != 0) failures++; end
    for (int a = 0; a < 128; a++) begin
      model[a] = $urandom_range(0, 255);
      @(negedge clk); wr_en = 1; wr_addr = 7'(a); wr_data = 8'(model[a]);
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 4; i++) rd_addr[i] = 7'($urandom_range(0, 127));
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(rd_data[i]) != model[rd_addr[i]]) begin
          failures++;
          if (failures < 10) $display("FAIL: port %0d addr %0d got %0d exp %0d", i, rd_addr[i], rd_data[i], model[rd_addr[i]]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
