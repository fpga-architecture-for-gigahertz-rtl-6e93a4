// image_reject_decim: complex halfband image-suppression filter with
// decimation by two, 8 real samples in, 4 complex samples out per clock.
//
// The real input carries the wanted band around 750 MHz and its mirror image
// around -750 MHz (1 GS/s). The 27-tap filter h keeps the first and removes
// the second, giving an analytic signal; its real part is 1/2 at the centre
// tap (delay 13) alone, and its imaginary part is odd-symmetric with nonzero
// taps only at even delays (see HB_COEFS in ddc_pkg). Only the outputs at
// even sample indices are needed after decimation by two, so only those are
// computed, halving the work. For an even output index, the centre tap reads
// an odd-index sample while every imaginary tap reads an even-index one:
//  * I (real part): 1/2 * x(n-j-13), a delayed copy of the input, no scaler;
//  * Q (imaginary part): polyphase_fir in direct form with odd symmetry, so
//    each pair of taps shares one LUT scaler after a registered subtraction,
//    7 scalers per kept output.
//
// Interface: x[r] = x(n-r) with n = 8t+7 for block t. Lane l (0..3) of the
// outputs is block element j = 2l+1, decimated sample 4t+3-l (lane 0 is the
// newest). Both outputs carry one fractional bit: i_out = x(n-j-13) exactly,
// q_out = round(2 * sum h_im(k) x(n-j-k)), saturated to OUT_W bits; the
// filter's passband gain is one. Timing: fir_latency(FORM_DIRECT, DATA_W,
// 27, SYM_ODD) clocks (10 for 14-bit data) from input block to output lanes,
// with out_valid delayed alike.
// The filter construction, its length, the sharing of the real/imaginary
// structure and computing only kept outputs follow the published design;
// coefficient values (from an equiripple design of that specification),
// widths and pipelining are this design's choices.
module image_reject_decim
  import ddc_pkg::*;
#(
  parameter int DATA_W = 14,
  parameter int OUT_W  = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x [P],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  i_out [P/2],
  output logic signed [OUT_W-1:0]  q_out [P/2]
);

  localparam int LAT = fir_latency(FORM_DIRECT, DATA_W, HB_TAPS, SYM_ODD);
  localparam int M   = (P - 1 + HB_CENTER) / P;

  // ---- imaginary part: odd-symmetric direct-form polyphase FIR
  logic signed [OUT_W-1:0] q_all [P];
  polyphase_fir #(
    .L(HB_TAPS), .DATA_W(DATA_W), .COEF_W(HB_COEF_W), .COEFS(HB_COEFS),
    .SYM(SYM_ODD), .FORM(FORM_DIRECT), .OUT_MASK(DECIM_MASK),
    .FRAC(HB_FRAC - 1), .OUT_W(OUT_W)
  ) u_q (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y(q_all)
  );

  // ---- real part: centre tap, a pure delay
  // Same input register and block columns as the filter, then the rest of
  // its latency as plain registers.
  logic signed [DATA_W-1:0] col [M+1][P];
  always_ff @(posedge clk) begin
    if (rst) col <= '{default: '0};
    else begin
      col[0] <= x;
      for (int m = 1; m <= M; m++) col[m] <= col[m-1];
    end
  end

  logic signed [DATA_W-1:0] i_pipe [LAT-1][P/2];
  always_ff @(posedge clk) begin
    if (rst) i_pipe <= '{default: '0};
    else begin
      for (int l = 0; l < P/2; l++) begin
        int d;
        d = 2 * l + 1 + HB_CENTER;  // delay of the centre tap for j = 2l+1
        i_pipe[0][l] <= col[d / P][d % P];
      end
      for (int s = 1; s < LAT - 1; s++) i_pipe[s] <= i_pipe[s-1];
    end
  end

  always_comb begin
    for (int l = 0; l < P/2; l++) begin
      i_out[l] = OUT_W'(i_pipe[LAT-2][l]);
      q_out[l] = q_all[2 * l + 1];
    end
  end

endmodule
