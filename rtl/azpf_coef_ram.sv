// azpf_coef_ram: programmable azimuth filter coefficient store.
//
// Holds the 4*M taps h(0..4M-1) of the azimuth pre-filter, up to 128 taps
// of 8 bits (M = 32), written by the host one tap per clock through
// wr_en/wr_addr/wr_data. The poly-phase filter needs, for every input line,
// the tap of each of its four phases at once, so the store has four
// combinational read ports; the controller latches their values at the
// start of a line. Tap k of the filter is at address k. Reset clears all
// taps to zero.
module azpf_coef_ram
  import azpf_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_TAPS,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            wr_en,
  input  logic [AW-1:0]                   wr_addr,
  input  logic [COEF_W-1:0]               wr_data,
  input  logic [NPHASE-1:0][AW-1:0]       rd_addr,
  output logic [NPHASE-1:0][COEF_W-1:0]   rd_data
);
  logic [COEF_W-1:0] taps [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(DEPTH); k++) taps[k] <= '0;
    end else if (wr_en) begin
      taps[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NPHASE); i++) rd_data[i] = taps[rd_addr[i]];
  end
endmodule
