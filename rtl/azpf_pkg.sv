// azpf_pkg: widths, constants and small arithmetic helpers shared by the
// azimuth pre-filter (AzPF) modules.
//
// The AzPF takes an 8-bit offset-video radar echo, brings it to complex
// baseband with a quarter-rate I/Q demodulator and a half-band filter, and
// then filters and decimates it in the azimuth (pulse-to-pulse) direction
// with a 4-phase poly-phase integrate-and-dump filter. Sizes from the
// design description: 8-bit ADC samples, 8k samples per range line, 12-bit
// output samples, a filter of length 4*M, M selectable in {1,2,4,8,16,32}
// and 8-bit filter coefficients. The remaining widths (demodulator output,
// accumulator word) and the half-band coefficients are this design's own
// choices.
package azpf_pkg;

  // ---- sizes taken from the design description ----
  localparam int unsigned ADC_W      = 8;     // bits per input sample
  localparam int unsigned NS_DEFAULT = 8192;  // samples per range line
  localparam int unsigned OUT_W      = 12;    // bits per output sample (I or Q)
  localparam int unsigned NPHASE     = 4;     // overlapping filter phases
  localparam int unsigned MAX_LOG2M  = 5;     // M up to 32
  localparam int unsigned COEF_W     = 8;     // azimuth coefficient bits
  localparam int unsigned MAX_TAPS   = NPHASE << MAX_LOG2M; // 4*32 = 128

  // ---- this design's own choices ----
  localparam int unsigned DW         = 10;    // demodulator / half-band output
  localparam int unsigned ACC_W      = 16;    // azimuth accumulator word
  localparam int unsigned SHIFT_W    = 3;     // product right-shift control

  // Half-band low-pass (quarter-rate demodulator). Only the odd taps are
  // nonzero apart from the centre tap of 1/2; these are the 8 odd taps of a
  // Hamming-windowed half-band sinc, h(k) = w(k) * sin(pi*k/2)/(pi*k),
  // scaled by 512 and rounded.
  localparam int unsigned HB_K       = 4;     // odd taps on each side
  localparam int unsigned HB_TAPS    = 2 * HB_K;
  localparam int unsigned HB_FRAC    = 9;     // coefficient scale 2^9
  localparam int unsigned HB_CW      = 10;

  function automatic logic signed [HB_CW-1:0] hb_coef(input int unsigned k);
    // symmetric: taps k and HB_TAPS-1-k are equal
    int unsigned m;
    m = (k < HB_K) ? (HB_K - 1 - k) : (k - HB_K);
    case (m)
      0:       return 10'sd157;
      1:       return -10'sd39;
      2:       return 10'sd12;
      default: return -10'sd3;
    endcase
  endfunction

  // Saturate a wide signed value to W bits (W <= 32).
  function automatic logic signed [31:0] sat_w(input logic signed [39:0] v,
                                               input int unsigned w);
    logic signed [39:0] hi, lo;
    hi = (40'sd1 <<< (w - 1)) - 40'sd1;
    lo = -(40'sd1 <<< (w - 1));
    if (v > hi)      return hi[31:0];
    else if (v < lo) return lo[31:0];
    else             return v[31:0];
  endfunction

  // Everything the azimuth datapath needs to know about the current line.
  typedef struct packed {
    logic [NPHASE-1:0][COEF_W-1:0] coef;  // coefficient of phase i = 0..3
    logic [1:0]                    base;  // slot started by the current block
    logic                          first; // first line of a block: restart slot
    logic                          dump;  // last line of a block: emit a slot
    logic                          emit;  // at least 4 blocks seen: output valid
    logic [SHIFT_W-1:0]            shift; // product right shift
  } line_ctx_t;

endpackage
