// azpf_iq_demod: quarter-rate digital I/Q down-conversion.
//
// The offset-video echo has its carrier at a quarter of the sampling rate,
// so multiplying by exp(-j*pi*n/2) needs no multiplier: the mixing sequence
// is 1, -j, -1, +j. Even samples land on the I channel only and odd samples
// on the Q channel only, each with the sign (-1)^p, where p = n/2 is the
// index of the even/odd sample pair:
//     I(p) =  s(2p)   * (-1)^p
//     Q(p) = -s(2p+1) * (-1)^p
// s is the ADC code with its offset removed (offset binary, 128 = zero,
// converted by inverting the MSB). One pair is converted per processing
// step; the outputs are registered. in_real low means a padding step (after
// the end of the line): the outputs are then zero but out_step still
// follows in_step, so the half-band filter that follows can be flushed.
//
// Timing: on a clock with ce and in_step high the result for that pair
// appears on the outputs, together with out_step high, and holds until the
// next ce. out_step is low after a ce clock without in_step.
module azpf_iq_demod
  import azpf_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic                  in_step,
  input  logic                  in_real,
  input  logic                  in_odd_pair,   // p is odd
  input  logic [2*ADC_W-1:0]    in_pair,       // {sample 2p+1, sample 2p}
  output logic                  out_step,
  output logic signed [DW-1:0]  out_i,
  output logic signed [DW-1:0]  out_q
);
  logic signed [ADC_W-1:0] s_even, s_odd;
  logic signed [DW-1:0]    i_next, q_next;

  always_comb begin
    s_even = signed'({~in_pair[ADC_W-1],   in_pair[ADC_W-2:0]});
    s_odd  = signed'({~in_pair[2*ADC_W-1], in_pair[2*ADC_W-2:ADC_W]});
    if (!in_real) begin
      i_next = '0;
      q_next = '0;
    end else if (in_odd_pair) begin
      i_next = -DW'(s_even);
      q_next =  DW'(s_odd);
    end else begin
      i_next =  DW'(s_even);
      q_next = -DW'(s_odd);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_step <= 1'b0;
      out_i    <= '0;
      out_q    <= '0;
    end else if (ce) begin
      out_step <= in_step;
      if (in_step) begin
        out_i <= i_next;
        out_q <= q_next;
      end
    end
  end
endmodule
