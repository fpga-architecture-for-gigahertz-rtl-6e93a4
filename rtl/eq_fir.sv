// eq_fir: the 14-tap real equalizer, 8 samples per clock.
//
// It follows the sampler and corrects the combined RF/IF filters: together
// with the image-suppression filter their passband approximates a pure
// delay. The taps have no symmetry (the filter need not be linear-phase), so
// no scaler can be shared between taps; instead the filter is built in the
// transposed polyphase form with every column sum computed by lookup tables.
// For output element j (y(n-j)) and block column m, the terms with delay
// j + k = 8m + r form a linear combination of the eight current input
// elements x(n-r) with coefficients c(8m + r - j); one da_lincomb (four words
// per table, one bit position per table: two distinct tables per data bit)
// computes it. Column sums enter a registered accumulator chain whose
// registers are also the z^-8 block delays, as in polyphase_fir.
//
// Interface: x[r] = x(n-r), DATA_W bits; y[j] = y(n-j), rounded to nearest by
// dropping FRAC fractional coefficient bits and saturated to OUT_W bits.
// Timing: eq_latency(DATA_W) clocks (ddc_pkg; 9 for 12-bit data) from an
// input block to its output block;
// out_valid is in_valid delayed to match. The tap count and the filter's
// role follow the published design; the coefficient values (the real ones
// come from a measurement of the analog filters) are placeholders in
// ddc_pkg, and the widths, rounding and pipeline are this design's choices.
module eq_fir
  import ddc_pkg::*;
#(
  parameter int          L      = EQ_TAPS,
  parameter int          DATA_W = 12,
  parameter int          COEF_W = EQ_COEF_W,
  parameter coef_array_t COEFS  = EQ_COEFS,
  parameter int          FRAC   = EQ_FRAC,
  parameter int          OUT_W  = 14
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x [P],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y [P]
);

  localparam int M    = (P - 1 + L - 1) / P;  // last block column
  localparam int SW   = DATA_W + COEF_W + 3;  // one column sum
  localparam int ACCW = SW + 2;
  localparam int LAT  = eq_latency(DATA_W);

  logic signed [DATA_W-1:0] in_q [P];
  always_ff @(posedge clk) begin
    if (rst) in_q <= '{default: '0};
    else     in_q <= x;
  end

  logic [LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];

  logic signed [ACCW-1:0] acc_out [P];

  for (genvar j = 0; j < P; j++) begin : g_out
    logic signed [SW-1:0]   csum [M+1];
    logic signed [ACCW-1:0] acc  [M+2];
    assign acc[M+1] = '0;
    for (genvar m = 0; m <= M; m++) begin : g_col
      // Column sum: sum_r c(8m + r - j) * x(n-r).
      da_lincomb #(.N_WORDS(P), .DATA_W(DATA_W), .WPL(4), .BPL(1),
                   .COEF_W(COEF_W), .COEFS(COEFS), .N_COEFS(L),
                   .COEF_BASE(P * m - j), .OUT_W(SW)) u_col (
        .clk(clk), .rst(rst), .x(in_q), .y(csum[m]));
      always_ff @(posedge clk) begin
        if (rst) acc[m] <= '0;
        else     acc[m] <= acc[m+1] + ACCW'(csum[m]);
      end
    end
    assign acc_out[j] = acc[0];
  end

  always_ff @(posedge clk) begin
    if (rst) y <= '{default: '0};
    else
      for (int j = 0; j < P; j++)
        y[j] <= OUT_W'(round_sat(longint'(acc_out[j]), FRAC, OUT_W));
  end

endmodule
