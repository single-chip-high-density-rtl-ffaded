// azpf_top: SAR azimuth pre-filter (AzPF) for on-board data reduction.
//
// Input: the digitised offset-video echo, 8-bit offset-binary samples at the
// 100 MHz system clock, one range line per radar pulse. Output: complex
// baseband samples of 12 bits (I and Q), one output range line for every M
// input range lines, M = 1, 2, 4, 8, 16 or 32.
//
// Data path, all on one clock:
//   ADC -> azpf_line_buffer (full rate)  -> azpf_iq_demod -> azpf_halfband
//       -> azpf_prefilter (+ azpf_acc_mem) -> output
// The line is captured at the sample rate; the rest runs during the gap
// before the next pulse at the processing rate set by azpf_ce_gen (ce one
// clock in CE_DIV, 12.5 MHz with the default 8). The demodulator/half-band
// pair turns NS real samples into NS/2 complex range bins. azpf_controller
// sequences each line and feeds the azimuth filter its coefficients from
// azpf_coef_ram.
//
// Interfaces:
//   adc_valid/adc_sol/adc_data  sample stream, adc_sol with the first sample
//                               of a range line
//   cfg_ns                      samples per line (even, up to NS), sampled
//                               at adc_sol
//   cfg_log2m, cfg_shift        log2 of M and the product shift, sampled
//                               when a line starts processing
//   coef_we/coef_addr/coef_data azimuth tap k at address k (k < 4M); write
//                               while busy is low
//   out_valid/out_bin/out_i/out_q  one-clock pulses, bins in order 0..NS/2-1
//   out_line                    number of output lines completed
//   mode_switch                 pulse: a new M was taken into use
//   busy, line_dropped          a line that starts while the previous one is
//                               still held is dropped (line_dropped pulse)
// Processing a line takes (NS/2 + HB_K + about 8) ce periods; with NS = 8192
// and CE_DIV = 8 that is about 33,000 clocks (330 us at 100 MHz), which fits
// in the pulse interval of 500 us at 2 kHz PRF together with the 82 us
// capture time.
module azpf_top
  import azpf_pkg::*;
#(
  parameter int unsigned NS     = NS_DEFAULT,
  parameter int unsigned CE_DIV = 8,
  localparam int unsigned NP  = NS / 2,
  localparam int unsigned AW  = $clog2(NP),
  localparam int unsigned LW  = $clog2(NS) + 1,
  localparam int unsigned TAW = $clog2(MAX_TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adc_valid,
  input  logic                     adc_sol,
  input  logic [ADC_W-1:0]         adc_data,
  input  logic [LW-1:0]            cfg_ns,
  input  logic [2:0]               cfg_log2m,
  input  logic [SHIFT_W-1:0]       cfg_shift,
  input  logic                     coef_we,
  input  logic [TAW-1:0]           coef_addr,
  input  logic [COEF_W-1:0]        coef_data,
  output logic                     out_valid,
  output logic [AW-1:0]            out_bin,
  output logic signed [OUT_W-1:0]  out_i,
  output logic signed [OUT_W-1:0]  out_q,
  output logic [15:0]              out_line,
  output logic                     busy,
  output logic                     mode_switch,
  output logic                     line_dropped
);
  logic ce;
  azpf_ce_gen #(.DIV(CE_DIV)) u_ce (.clk(clk), .rst_n(rst_n), .ce(ce));

  logic               line_full, line_release, rd_en;
  logic [AW:0]        line_pairs;
  logic [AW-1:0]      rd_addr;
  logic [2*ADC_W-1:0] rd_data;

  azpf_line_buffer #(.NS(NS)) u_lbuf (
    .clk, .rst_n,
    .adc_valid, .adc_sol, .adc_data, .cfg_ns,
    .line_full, .line_pairs, .line_release,
    .overrun (line_dropped),
    .rd_en, .rd_addr, .rd_data
  );

  logic                            s1_step, s1_real, s1_odd, clear;
  logic [NPHASE-1:0][TAW-1:0]      cf_addr;
  logic [NPHASE-1:0][COEF_W-1:0]   cf_data;
  line_ctx_t                       ctx;

  azpf_controller #(.NS(NS)) u_ctrl (
    .clk, .rst_n, .ce,
    .cfg_log2m, .cfg_shift,
    .line_full, .line_pairs, .line_release,
    .rd_en, .rd_addr,
    .s1_step, .s1_real, .s1_odd,
    .clear,
    .coef_addr (cf_addr),
    .coef_data (cf_data),
    .ctx, .busy, .mode_switch, .out_line
  );

  azpf_coef_ram u_coef (
    .clk, .rst_n,
    .wr_en (coef_we), .wr_addr (coef_addr), .wr_data (coef_data),
    .rd_addr (cf_addr), .rd_data (cf_data)
  );

  logic                 dm_step;
  logic signed [DW-1:0] dm_i, dm_q;
  azpf_iq_demod u_demod (
    .clk, .rst_n, .ce,
    .in_step (s1_step), .in_real (s1_real), .in_odd_pair (s1_odd),
    .in_pair (rd_data),
    .out_step (dm_step), .out_i (dm_i), .out_q (dm_q)
  );

  logic                 hb_valid;
  logic signed [DW-1:0] hb_i, hb_q;
  azpf_halfband u_hb (
    .clk, .rst_n, .ce, .clear,
    .in_step (dm_step), .in_i (dm_i), .in_q (dm_q),
    .out_valid (hb_valid), .out_i (hb_i), .out_q (hb_q)
  );

  azpf_prefilter #(.NBIN(NP)) u_pf (
    .clk, .rst_n, .ce, .clear, .ctx,
    .in_valid (hb_valid), .in_i (hb_i), .in_q (hb_q),
    .out_valid, .out_bin, .out_i, .out_q
  );

  // the line buffer is never written while the controller reads it
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           rd_en |-> line_full);
  // taps are latched at the start of a line: the host writes them while idle
  a_coef_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                coef_we |-> !busy);
endmodule
