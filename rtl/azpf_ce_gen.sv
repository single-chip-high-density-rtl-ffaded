// azpf_ce_gen: processing clock-enable generator.
//
// The whole AzPF runs on one 100 MHz clock. The range line is captured at
// the full sample rate, and the filtering is done in the gap between radar
// pulses at a reduced rate obtained with a clock enable rather than a second
// clock: ce is high for one clock in every DIV clocks (DIV = 8 gives the
// 12.5 MHz processing rate of the description). A free-running counter
// counts 0..DIV-1 and ce is asserted in the clock where it reads DIV-1.
// Synchronous, active-low reset; ce is low during reset and first rises DIV
// clocks after reset is released.
module azpf_ce_gen #(
  parameter int unsigned DIV = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic ce
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      ce  <= 1'b0;
    end else begin
      if (cnt == CW'(DIV - 1)) cnt <= '0;
      else                     cnt <= cnt + 1'b1;
      ce <= (cnt == CW'(DIV - 1)) || (DIV == 1);
    end
  end
endmodule
