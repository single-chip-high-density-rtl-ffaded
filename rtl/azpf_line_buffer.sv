// azpf_line_buffer: range-line store between the ADC and the filters.
//
// One range line of offset-video samples is written at the full ADC rate
// and read back, two samples (one even/odd pair) per read, at the reduced
// processing rate during the idle time before the next radar pulse. Pairs
// are packed into one word {odd, even}, so a line of NS samples occupies
// NS/2 words and the quarter-rate demodulator gets both of its samples in
// one read.
//
// Write side (every clock): a sample is taken when adc_valid is high;
// adc_sol marks the first sample of a line. The line length in samples is
// taken from cfg_ns (even, 2..NS) at adc_sol. When the last sample has been
// written, line_full rises and line_pairs holds the number of pairs. The
// buffer then refuses new lines until the reader pulses line_release: a
// line whose adc_sol arrives while line_full is high is dropped whole, and
// overrun pulses for one clock. An adc_sol in the middle of a line restarts
// the line.
//
// Read side: rd_data is registered; it is updated one clock after a clock
// with rd_en high and holds its value otherwise.
module azpf_line_buffer
  import azpf_pkg::*;
#(
  parameter int unsigned NS = NS_DEFAULT,
  localparam int unsigned NP = NS / 2,
  localparam int unsigned AW = $clog2(NP),
  localparam int unsigned LW = $clog2(NS) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ADC side
  input  logic                 adc_valid,
  input  logic                 adc_sol,
  input  logic [ADC_W-1:0]     adc_data,
  input  logic [LW-1:0]        cfg_ns,
  // status towards the controller
  output logic                 line_full,
  output logic [AW:0]          line_pairs,
  input  logic                 line_release,
  output logic                 overrun,
  // read port
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic [2*ADC_W-1:0]   rd_data
);
  logic [2*ADC_W-1:0] mem [NP];

  logic             writing;
  logic [LW-1:0]    widx;     // index of the next sample
  logic [LW-1:0]    wlen;     // samples in this line
  logic [ADC_W-1:0] even_q;   // even sample waiting for its partner

  logic [LW-1:0]    len_in;
  always_comb begin
    len_in = {cfg_ns[LW-1:1], 1'b0};
    if (len_in < LW'(2))  len_in = LW'(2);
    if (len_in > LW'(NS)) len_in = LW'(NS);
  end

  // sample index of this write and whether it is the last one
  logic [LW-1:0] cur_idx;
  logic [LW-1:0] cur_len;
  logic          wr_now;
  always_comb begin
    cur_idx = adc_sol ? '0 : widx;
    cur_len = adc_sol ? len_in : wlen;
    wr_now  = adc_valid && (adc_sol ? !line_full : writing);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      writing    <= 1'b0;
      widx       <= '0;
      wlen       <= LW'(2);
      even_q     <= '0;
      line_full  <= 1'b0;
      line_pairs <= '0;
      overrun    <= 1'b0;
    end else begin
      overrun <= adc_valid && adc_sol && line_full;
      if (line_release) line_full <= 1'b0;
      if (adc_valid && adc_sol && line_full) writing <= 1'b0;
      if (wr_now) begin
        if (!cur_idx[0]) even_q <= adc_data;
        if (cur_idx == cur_len - 1'b1) begin
          writing    <= 1'b0;
          line_full  <= 1'b1;
          line_pairs <= cur_len[LW-1:1];
        end else begin
          writing <= 1'b1;
        end
        widx <= cur_idx + 1'b1;
        wlen <= cur_len;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_now && cur_idx[0])
      mem[cur_idx[AW:1]] <= {adc_data, even_q};
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
