// azpf_halfband: half-band low-pass filter of the I/Q demodulator,
// decimating by two.
//
// After quarter-rate mixing every odd I sample and every even Q sample is
// zero. All even taps of a half-band filter are zero except the centre tap
// (1/2), so on the I channel the filter reduces to a pure delay that lines
// I up with the Q filter, and on the Q channel only the odd-indexed samples
// (one per pair) meet the odd taps. The filter therefore runs at the pair
// rate: each step shifts one I and one Q value in and produces one complex
// baseband sample.
//
// With q(n) the Q value of pair n and HB_TAPS = 8 odd taps c(k), after
// pair n has been shifted in:
//     Q_out = sat( (sum_k c(k) * q(n-k)) >>> (HB_FRAC-1) )     k = 0..7
//     I_out = I(n - (HB_K-1))
// which is the filtered sample at pair n-3. Both outputs carry a gain of 2
// against the textbook filter (centre tap 1, odd taps 2*c/512), so a full
// scale input stays full scale. The coefficients are a Hamming-windowed
// half-band design of this module's own (see azpf_pkg).
//
// clear (sampled on a ce clock) zeroes the delay lines, as at the start of
// a range line. out_valid is high after steps n >= HB_K-1, i.e. once the
// output refers to a real pair of the line; the caller pads the end of the
// line with HB_K-1 zero steps to flush the last outputs. Outputs are
// registered and change only on ce clocks.
module azpf_halfband
  import azpf_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic                  clear,
  input  logic                  in_step,
  input  logic signed [DW-1:0]  in_i,
  input  logic signed [DW-1:0]  in_q,
  output logic                  out_valid,
  output logic signed [DW-1:0]  out_i,
  output logic signed [DW-1:0]  out_q
);
  logic signed [DW-1:0] qd [HB_TAPS];  // qd[0] newest
  logic signed [DW-1:0] id [HB_K];     // id[0] newest
  logic [$clog2(HB_K):0] seen;         // pairs shifted in, saturating at HB_K

  logic signed [DW+HB_CW+3:0] acc;
  always_comb begin
    acc = (DW+HB_CW+4)'(in_q) * (DW+HB_CW+4)'(hb_coef(0));
    for (int k = 1; k < HB_TAPS; k++)
      acc += (DW+HB_CW+4)'(qd[k-1]) * (DW+HB_CW+4)'(hb_coef(k));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < HB_TAPS; k++) qd[k] <= '0;
      for (int k = 0; k < HB_K; k++)    id[k] <= '0;
      seen      <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else if (ce) begin
      if (clear) begin
        for (int k = 0; k < HB_TAPS; k++) qd[k] <= '0;
        for (int k = 0; k < HB_K; k++)    id[k] <= '0;
        seen      <= '0;
        out_valid <= 1'b0;
      end else if (in_step) begin
        qd[0] <= in_q;
        for (int k = 1; k < HB_TAPS; k++) qd[k] <= qd[k-1];
        id[0] <= in_i;
        for (int k = 1; k < HB_K; k++)    id[k] <= id[k-1];
        if (seen != ($clog2(HB_K)+1)'(HB_K)) seen <= seen + 1'b1;
        out_valid <= (seen >= ($clog2(HB_K)+1)'(HB_K - 1));
        out_i     <= (HB_K > 1) ? id[HB_K-2] : in_i;
        out_q     <= DW'(sat_w(40'(acc >>> (HB_FRAC - 1)), DW));
      end else begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
