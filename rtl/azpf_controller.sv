// azpf_controller: line sequencer of the AzPF.
//
// Waits until the line buffer holds a complete range line, then runs the
// filters over it at the processing rate (one step per ce clock) and hands
// the buffer back. For each line it
//   * reads the NP pairs of the line in order (rd_en/rd_addr) and then
//     issues HB_K-1 padding steps that flush the half-band filter,
//   * clears the half-band filter and the azimuth bin counter (clear, one
//     step before the first read),
//   * supplies the azimuth line context: the coefficient h(i*M + j) of each
//     phase i (read from azpf_coef_ram and latched for the line), the block
//     slot base, and the first/dump/emit flags,
//   * after the pipeline has drained, pulses line_release and advances the
//     line index j (0..M-1) and the block count.
// The decimation factor M = 2^cfg_log2m (cfg_log2m clamped to 0..5, so M
// is one of 1, 2, 4, 8, 16, 32) and the product shift are sampled when a
// line is accepted. When the sampled M differs from the one in use the
// filter restarts from the first line of a block and no output is produced
// until four new blocks have been seen (mode_switch pulses for one clock).
//
// Timing: the step that reads pair p is followed one ce later by the
// demodulator input for pair p (s1_* outputs, aligned with the line
// buffer's registered read data). busy is high from accepting a line until
// release.
module azpf_controller
  import azpf_pkg::*;
#(
  parameter int unsigned NS = NS_DEFAULT,
  localparam int unsigned NP = NS / 2,
  localparam int unsigned AW = $clog2(NP),
  localparam int unsigned TAW = $clog2(MAX_TAPS)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             ce,
  // configuration
  input  logic [2:0]                       cfg_log2m,
  input  logic [SHIFT_W-1:0]               cfg_shift,
  // line buffer
  input  logic                             line_full,
  input  logic [AW:0]                      line_pairs,
  output logic                             line_release,
  output logic                             rd_en,
  output logic [AW-1:0]                    rd_addr,
  // demodulator input tags, one step after the read
  output logic                             s1_step,
  output logic                             s1_real,
  output logic                             s1_odd,
  // filter control
  output logic                             clear,
  output logic [NPHASE-1:0][TAW-1:0]       coef_addr,
  input  logic [NPHASE-1:0][COEF_W-1:0]    coef_data,
  output line_ctx_t                        ctx,
  // status
  output logic                             busy,
  output logic                             mode_switch,
  output logic [15:0]                      out_line
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_RUN, S_DRAIN, S_DONE} state_t;
  localparam int unsigned DRAIN_STEPS = 6;

  state_t                       state;
  logic [2:0]                   m_log2;       // decimation in use
  logic [MAX_LOG2M-1:0]         j;            // line within block
  logic [1:0]                   base;         // block index mod 4
  logic [1:0]                   nblk;         // blocks seen, saturating at 3
  logic [AW:0]                  npairs;
  logic [AW+1:0]                p;            // step index
  logic [2:0]                   dcnt;
  logic [SHIFT_W-1:0]           shift_q;
  logic [NPHASE-1:0][COEF_W-1:0] coef_q;

  logic [2:0] log2m_in;
  assign log2m_in = (cfg_log2m > 3'(MAX_LOG2M)) ? 3'(MAX_LOG2M) : cfg_log2m;

  logic [MAX_LOG2M-1:0] j_last;                // M-1
  assign j_last = MAX_LOG2M'((6'd1 << m_log2) - 6'd1);

  always_comb begin
    for (int i = 0; i < int'(NPHASE); i++)
      coef_addr[i] = TAW'((TAW'(i) << m_log2) + TAW'(j));
  end

  always_comb begin
    ctx.coef  = coef_q;
    ctx.base  = base;
    ctx.first = (j == '0);
    ctx.dump  = (j == j_last);
    ctx.emit  = (nblk == 2'd3);
    ctx.shift = shift_q;
  end

  logic last_step;
  assign last_step = (p == (AW+2)'(npairs) + (AW+2)'(HB_K - 2));

  assign clear        = (state == S_START);
  assign line_release = (state == S_DONE);
  assign busy         = (state != S_IDLE);
  assign rd_en        = ce && (state == S_RUN) && (p < (AW+2)'(npairs));
  assign rd_addr      = p[AW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      m_log2      <= 3'd2;      // M = 4 until configured otherwise
      j           <= '0;
      base        <= '0;
      nblk        <= '0;
      npairs      <= '0;
      p           <= '0;
      dcnt        <= '0;
      shift_q     <= '0;
      coef_q      <= '0;
      s1_step     <= 1'b0;
      s1_real     <= 1'b0;
      s1_odd      <= 1'b0;
      mode_switch <= 1'b0;
      out_line    <= '0;
    end else begin
      mode_switch <= 1'b0;
      if (ce) begin
        s1_step <= (state == S_RUN);
        s1_real <= (state == S_RUN) && (p < (AW+2)'(npairs));
        s1_odd  <= p[0];
      end
      unique case (state)
        S_IDLE: if (line_full) begin
          if (log2m_in != m_log2) begin
            m_log2      <= log2m_in;
            j           <= '0;
            base        <= '0;
            nblk        <= '0;
            mode_switch <= 1'b1;
          end
          shift_q <= cfg_shift;
          npairs  <= line_pairs;
          state   <= S_START;
        end
        S_START: if (ce) begin
          coef_q <= coef_data;
          p      <= '0;
          state  <= S_RUN;
        end
        S_RUN: if (ce) begin
          p <= p + 1'b1;
          if (last_step) begin
            dcnt  <= '0;
            state <= S_DRAIN;
          end
        end
        S_DRAIN: if (ce) begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 3'(DRAIN_STEPS - 1)) state <= S_DONE;
        end
        S_DONE: begin
          if (ctx.dump && ctx.emit) out_line <= out_line + 1'b1;
          if (ctx.dump) begin
            j    <= '0;
            base <= base + 1'b1;
            if (nblk != 2'd3) nblk <= nblk + 1'b1;
          end else begin
            j <= j + 1'b1;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
