// ddc_pkg: shared types, constants and coefficient sets of the 1 GS/s
// IF-to-baseband downconverter.
//
// The datapath runs at one eighth of the sample rate (125 MHz for 1 GS/s), so
// every clock carries a block of P = 8 real samples, element r of the block
// being x(n-r) (element 0 is the newest sample). A filter delay of k samples
// is written k = 8m + r: element r of the block delayed by m clocks.
//
// Coefficient sets:
//  * EQ_COEFS: the 14 taps of the real, nonlinear-phase equalizer. The real
//    taps depend on the measured RF/IF filters and are not published; the set
//    here is a placeholder with a gain of about 4 dB and a group delay of
//    about 8 samples, in two's complement with EQ_FRAC fractional bits.
//  * HB_COEFS: the imaginary part of the 27-tap halfband image-suppression
//    filter, h(k) for delays k = 0..26. It is j/2 times a 14-tap equiripple
//    Hilbert transformer (band 0.1..0.5 of its own rate), zero-interpolated by
//    two, so only even delays are nonzero and h(26-k) = -h(k); the real part
//    is 1/2 at delay 13 alone. Values are round(2^12 * h). The stopband is
//    50..450 MHz at 1 GS/s (the image of the 750 MHz band, 250 MHz wide either
//    side of -750 MHz), about -50 dB.
package ddc_pkg;

  // Samples per clock: the polyphase factor.
  localparam int P = 8;

  // Structure of a polyphase FIR.
  typedef enum logic {
    FORM_DIRECT     = 1'b0,  // scaling follows the z^-8 block delays
    FORM_TRANSPOSED = 1'b1   // scaling precedes the z^-8 block delays
  } fir_form_e;

  // Coefficient symmetry a polyphase FIR may exploit to share scalers.
  typedef enum logic [1:0] {
    SYM_NONE = 2'd0,  // no sharing
    SYM_EVEN = 2'd1,  // c(k) =  c(L-1-k): linear phase, real filter
    SYM_ODD  = 2'd2   // c(k) = -c(L-1-k): odd (imaginary) part of a
                      // conjugate-symmetric complex filter
  } fir_sym_e;

  // Largest filter length held by the coefficient-array parameters.
  localparam int MAX_TAPS = 32;
  typedef int coef_array_t [MAX_TAPS];

  // Clocks through a pipelined adder tree of n operands (pipe_add_tree).
  function automatic int tree_latency(int n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

  // Clocks through lut_scaler: registered tables, then the adder tree over
  // the 4-bit pieces.
  function automatic int scaler_latency(int data_w);
    return 1 + tree_latency((data_w + 3) / 4);
  endfunction

  // Clocks through da_lincomb: registered tables, then the adder tree over
  // all tables.
  function automatic int da_latency(int n_words, int data_w, int wpl, int bpl);
    return 1 + tree_latency(((n_words + wpl - 1) / wpl) * ((data_w + bpl - 1) / bpl));
  endfunction

  // Number of scalers per output of a polyphase FIR of length l.
  function automatic int fir_scalers(int l, fir_sym_e sym);
    return (sym == SYM_NONE) ? l : (l + 1) / 2;
  endfunction

  // Clocks from a block at a polyphase_fir input to its result at the output.
  //   direct:     input reg, pre-add reg, scaler, output adder tree, round reg
  //   transposed: input reg, scaler, column adder tree (8 operands),
  //               accumulator reg, round reg
  function automatic int fir_latency(fir_form_e form, int data_w, int l, fir_sym_e sym);
    return (form == FORM_DIRECT)
      ? 2 + scaler_latency(data_w + 1) + tree_latency(fir_scalers(l, sym)) + 1
      : 1 + scaler_latency(data_w) + tree_latency(P) + 1 + 1;
  endfunction

  // ---------------------------------------------------------------- equalizer
  localparam int EQ_TAPS = 14;
  localparam int EQ_FRAC = 11;
  localparam int EQ_COEF_W = 14;
  localparam coef_array_t EQ_COEFS = '{
    -10, 18, -30, 46, -70, 110, -180, 330, 2900, 420, -160, 80, -36, 14,
    0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  // Clocks through eq_fir: input reg, DA sum, column-0 accumulator, round reg.
  function automatic int eq_latency(int data_w);
    return 1 + da_latency(P, data_w, 4, 1) + 1 + 1;
  endfunction

  // ------------------------------------------------------- image suppression
  localparam int HB_TAPS = 27;
  localparam int HB_CENTER = 13;
  localparam int HB_FRAC = 12;
  localparam int HB_COEF_W = 12;
  localparam coef_array_t HB_COEFS = '{
    16, 0, 32, 0, 64, 0, 116, 0, 206, 0, 400, 0, 1292, 0,
    -1292, 0, -400, 0, -206, 0, -116, 0, -64, 0, -32, 0, -16,
    0, 0, 0, 0, 0};

  // Decimation by two keeps the filter outputs at even sample indices. With
  // n = 8t+7 for block t, output element j of the block is y(8t+7-j), so the
  // kept elements are the odd ones.
  localparam logic [P-1:0] DECIM_MASK = 8'b1010_1010;

  // Round to nearest (ties toward +inf) by dropping SHIFT fractional bits,
  // then saturate to OUT_W bits. Written for 64-bit operands.
  function automatic longint round_sat(longint v, int shift, int out_w);
    longint r, hi, lo;
    r  = (shift > 0) ? ((v + (64'sd1 <<< (shift - 1))) >>> shift) : v;
    hi = (64'sd1 <<< (out_w - 1)) - 1;
    lo = -(64'sd1 <<< (out_w - 1));
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

endpackage
