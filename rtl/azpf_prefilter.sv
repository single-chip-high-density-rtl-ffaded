// azpf_prefilter: poly-phase azimuth pre-filter (overlapping weighted
// integrate-and-dump), decimating by M in the azimuth direction.
//
// The azimuth filter has L = 4*M taps h(0..L-1) and produces one output
// line for every M input lines. Input lines are grouped in blocks of M; a
// filter output is the weighted sum of the 4*M lines of four consecutive
// blocks. Four accumulators per range bin ("slots", one per phase) run
// overlapped: slot s is started at the first line of a block and is dumped
// at the last line of the fourth block after. For an input line with
// index j inside block b (j = 0..M-1), the slot started i blocks earlier
// (i = 0..3) receives x * h(i*M + j). When j = M-1 the slot with i = 3 is
// complete: its value is sent out and the slot is restarted with the next
// block. Per range bin this is y = sum_{k} h(k) * x(line 4M-1-k ... ),
// i.e. x of line n weighted by h of its position inside the 4M-line window,
// the oldest line taking h(0).
//
// Arithmetic (this design's own choice; the description fixes only 8-bit
// coefficients and 12-bit outputs): each DW-bit x times an 8-bit signed
// coefficient is arithmetically shifted right by ctx.shift, saturated to
// ACC_W = 16 bits and added with saturation. The output is the upper
// OUT_W = 12 bits of the dumped 16-bit accumulator (truncation).
//
// Pipeline, in processing steps (ce clocks): step A reads the four slots of
// the bin from azpf_acc_mem; step B adds, writes back and, on a dump line,
// presents the result. out_valid is a one-clock pulse in the clock after
// step B. Each range bin is touched once per line, so the read-modify-write
// has no hazard. clear (on a ce clock) restarts the bin counter at 0 for a
// new line; ctx must be held constant for the whole line. Output is only
// produced once ctx.emit is set (four blocks seen): before that the slot
// being dumped would hold lines from before the start.
module azpf_prefilter
  import azpf_pkg::*;
#(
  parameter int unsigned NBIN = NS_DEFAULT / 2,
  localparam int unsigned AW = $clog2(NBIN)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic                     clear,
  input  line_ctx_t                ctx,
  input  logic                     in_valid,
  input  logic signed [DW-1:0]     in_i,
  input  logic signed [DW-1:0]     in_q,
  output logic                     out_valid,
  output logic [AW-1:0]            out_bin,
  output logic signed [OUT_W-1:0]  out_i,
  output logic signed [OUT_W-1:0]  out_q
);
  localparam int unsigned PW = DW + COEF_W;

  logic [AW-1:0]        bin;     // next bin to read
  logic                 a_valid;
  logic [AW-1:0]        a_bin;
  logic signed [DW-1:0] a_i, a_q;

  logic [NPHASE-1:0][2*ACC_W-1:0] rd_data, wr_data;

  azpf_acc_mem #(.NBIN(NBIN)) u_mem (
    .clk     (clk),
    .rd_en   (ce && in_valid && !clear),
    .rd_addr (bin),
    .rd_data (rd_data),
    .wr_en   (ce && a_valid),
    .wr_addr (a_bin),
    .wr_data (wr_data)
  );

  function automatic logic signed [ACC_W-1:0] term_of(
      input logic signed [DW-1:0] x, input logic [COEF_W-1:0] c,
      input logic [SHIFT_W-1:0] sh);
    logic signed [PW-1:0] p;
    p = PW'(x) * PW'(signed'(c));
    return ACC_W'(sat_w(40'(p >>> sh), ACC_W));
  endfunction

  // step B arithmetic
  logic signed [ACC_W-1:0] new_i [NPHASE];
  logic signed [ACC_W-1:0] new_q [NPHASE];
  logic signed [ACC_W-1:0] dump_i, dump_q;
  always_comb begin
    dump_i = '0;
    dump_q = '0;
    for (int s = 0; s < int'(NPHASE); s++) begin
      logic [1:0] ph;
      logic signed [ACC_W-1:0] ti, tq, oi, oq;
      ph = ctx.base - 2'(s);          // blocks since slot s was started
      ti = term_of(a_i, ctx.coef[ph], ctx.shift);
      tq = term_of(a_q, ctx.coef[ph], ctx.shift);
      oq = signed'(rd_data[s][2*ACC_W-1:ACC_W]);
      oi = signed'(rd_data[s][ACC_W-1:0]);
      if (ctx.first && ph == 2'd0) begin
        new_i[s] = ti;
        new_q[s] = tq;
      end else begin
        new_i[s] = ACC_W'(sat_w(40'(oi) + 40'(ti), ACC_W));
        new_q[s] = ACC_W'(sat_w(40'(oq) + 40'(tq), ACC_W));
      end
      wr_data[s] = {new_q[s], new_i[s]};
      if (ph == 2'd3) begin
        dump_i = new_i[s];
        dump_q = new_q[s];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bin       <= '0;
      a_valid   <= 1'b0;
      a_bin     <= '0;
      a_i       <= '0;
      a_q       <= '0;
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (ce) begin
        if (clear) begin
          bin     <= '0;
          a_valid <= 1'b0;
        end else begin
          a_valid <= in_valid;
          if (in_valid) begin
            a_bin <= bin;
            a_i   <= in_i;
            a_q   <= in_q;
            bin   <= bin + 1'b1;
          end
        end
        if (a_valid && ctx.dump && ctx.emit) begin
          out_valid <= 1'b1;
          out_bin   <= a_bin;
          out_i     <= dump_i[ACC_W-1 -: OUT_W];
          out_q     <= dump_q[ACC_W-1 -: OUT_W];
        end
      end
    end
  end
endmodule
