// azpf_acc_mem: accumulator memory of the poly-phase azimuth filter.
//
// Four banks, one per overlapping filter phase ("slot"), each holding one
// complex accumulator {I, Q} of ACC_W bits per range bin. With 4096 range
// bins and 16-bit words this is 4 x 4096 x 32 = 512 kbit, the bulk of the
// on-chip memory of the design. All four banks are read and written at the
// same address in the same clock: the filter reads the four partial sums of
// a range bin, adds its contribution to each and writes them back.
// Read data is registered (one clock latency) and holds between reads.
module azpf_acc_mem
  import azpf_pkg::*;
#(
  parameter int unsigned NBIN = NS_DEFAULT / 2,
  localparam int unsigned AW = $clog2(NBIN)
) (
  input  logic                            clk,
  input  logic                            rd_en,
  input  logic [AW-1:0]                   rd_addr,
  output logic [NPHASE-1:0][2*ACC_W-1:0]  rd_data,
  input  logic                            wr_en,
  input  logic [AW-1:0]                   wr_addr,
  input  logic [NPHASE-1:0][2*ACC_W-1:0]  wr_data
);
  for (genvar b = 0; b < int'(NPHASE); b++) begin : g_bank
    logic [2*ACC_W-1:0] bank [NBIN];
    always_ff @(posedge clk) begin
      if (wr_en) bank[wr_addr] <= wr_data[b];
    end
    always_ff @(posedge clk) begin
      if (rd_en) rd_data[b] <= bank[rd_addr];
    end
  end
endmodule
