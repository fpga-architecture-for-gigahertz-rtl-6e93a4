// polyphase_fir: an FIR filter computed P = 8 samples per clock.
//
// Each clock brings a block x[r] = x(n-r), r = 0..7, and yields the block of
// outputs y[j] = y(n-j) = sum_k COEFS[k] * x(n-j-k). A term of delay
// d = j + k = 8m + r is element r of the input block taken m clocks back, so
// the sample-rate delay z^-8 is a single register per block element.
//
// FORM_DIRECT: the input blocks pass through a chain of block registers
// (columns m = 0..M); every output sums scaled register contents. With
// symmetric coefficients (SYM_EVEN, or SYM_ODD for the odd part of a
// conjugate-symmetric filter) the two samples that share a coefficient are
// first added (or subtracted) in a registered pre-adder, halving the scalers.
// FORM_TRANSPOSED: each input element is scaled once by every distinct
// coefficient value; those products are added into per-output accumulator
// chains whose registers double as the z^-8 delays. Under symmetry one
// product serves both taps of a pair, negated where SYM_ODD requires.
// Scaling uses lut_scaler (4-bit lookup tables); zero coefficients get no
// hardware. OUT_MASK selects which of the 8 outputs are built: a decimating
// filter builds only those it keeps, and the others read zero.
//
// Every addition is followed by a register: pre-adders, the pipelined adder
// trees (pipe_add_tree) inside the scalers and over each output's or
// column's terms, the accumulators and the rounding adder. Results are
// rounded to nearest by dropping FRAC bits and saturated to OUT_W. Timing:
// an input block reaches the output fir_latency(FORM, DATA_W, L, SYM) clocks
// later (ddc_pkg; 10 direct and 9 transposed at the defaults: in the
// transposed form the accumulator registers double as the block delays);
// out_valid is in_valid delayed by the same amount.
// Registers clear on the synchronous reset, so samples before the first
// valid block count as zero.
//
// The polyphase alignment of terms, the two forms and the symmetric sharing
// follow the published structures. Which of the sharing variants is used
// (pre-adders within one output in the direct form, shared products per input
// element in the transposed form), the pipeline placement and the widths are
// this design's choices.
module polyphase_fir
  import ddc_pkg::*;
#(
  parameter int          L        = 19,
  parameter int          DATA_W   = 12,
  parameter int          COEF_W   = 12,
  parameter coef_array_t COEFS    = '{-3, 7, -14, 25, -41, 66, -110, 205, -640, 1800,
                                      -640, 205, -110, 66, -41, 25, -14, 7, -3,
                                      0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0},
  parameter fir_sym_e    SYM      = SYM_EVEN,
  parameter fir_form_e   FORM     = FORM_TRANSPOSED,
  parameter logic [7:0]  OUT_MASK = 8'hFF,
  parameter int          FRAC     = 11,
  parameter int          OUT_W    = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x [P],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y [P]
);

  localparam int D    = (P - 1) + (L - 1);        // largest delay used
  localparam int M    = D / P;                     // last block column
  localparam int NK   = (SYM == SYM_NONE) ? L : (L + 1) / 2;
  localparam int PDW  = DATA_W + 1;                // pre-added data width
  localparam int PRW  = PDW + COEF_W;              // product width
  localparam int ACCW = PRW + $clog2(L) + 1;       // accumulator width
  localparam int LAT  = fir_latency(FORM, DATA_W, L, SYM);

  // Mirror tap of k and whether it reads its product negated.
  function automatic int mirror(int k);
    return L - 1 - k;
  endfunction
  function automatic int share_index(int k);
    return (SYM != SYM_NONE && k > mirror(k)) ? mirror(k) : k;
  endfunction
  function automatic bit share_neg(int k);
    return SYM == SYM_ODD && k > mirror(k);
  endfunction

  // Input register: block column 0.
  logic signed [DATA_W-1:0] in_q [P];
  always_ff @(posedge clk) begin
    if (rst) in_q <= '{default: '0};
    else     in_q <= x;
  end

  // Valid tag, delayed along with the data.
  logic [LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];

  logic signed [ACCW-1:0] acc_out [P];  // full-precision output per element

  if (FORM == FORM_DIRECT) begin : g_direct
    // Block delay line: col[m][r] = x(n - 8m - r).
    logic signed [DATA_W-1:0] col [M+1][P];
    always_comb col[0] = in_q;
    for (genvar m = 1; m <= M; m++) begin : g_col
      always_ff @(posedge clk) begin
        if (rst) col[m] <= '{default: '0};
        else     col[m] <= col[m-1];
      end
    end

    for (genvar j = 0; j < P; j++) begin : g_out
      if (OUT_MASK[j]) begin : g_on
        logic signed [PDW-1:0] pre  [NK];
        logic signed [PRW-1:0] prod [NK];
        for (genvar k = 0; k < NK; k++) begin : g_tap
          localparam int DA = j + k;
          localparam int DB = j + mirror(k);
          // Registered pre-adder of the two samples sharing COEFS[k].
          always_ff @(posedge clk) begin
            if (rst) pre[k] <= '0;
            else if (SYM == SYM_NONE || DA == DB)
              pre[k] <= PDW'(col[DA / P][DA % P]);
            else if (SYM == SYM_EVEN)
              pre[k] <= PDW'(col[DA / P][DA % P]) + PDW'(col[DB / P][DB % P]);
            else
              pre[k] <= PDW'(col[DA / P][DA % P]) - PDW'(col[DB / P][DB % P]);
          end
          if (COEFS[k] != 0) begin : g_mul
            lut_scaler #(.DATA_W(PDW), .COEF_W(COEF_W), .COEF(COEFS[k]),
                         .OUT_W(PRW)) u_scale (
              .clk(clk), .rst(rst), .x(pre[k]), .y(prod[k]));
          end else begin : g_zero
            assign prod[k] = '0;
          end
        end
        // Pipelined output sum.
        logic signed [ACCW-1:0] prod_x [NK];
        always_comb for (int k = 0; k < NK; k++) prod_x[k] = ACCW'(prod[k]);
        pipe_add_tree #(.N(NK), .W(ACCW)) u_sum (
          .clk(clk), .rst(rst), .in(prod_x), .sum(acc_out[j]));
      end else begin : g_off
        assign acc_out[j] = '0;
      end
    end
  end else begin : g_transposed
    // prod[r][k] = COEFS[k] * x(n-r), one per distinct coefficient.
    logic signed [PRW-1:0] prod [P][NK];
    for (genvar r = 0; r < P; r++) begin : g_in
      for (genvar k = 0; k < NK; k++) begin : g_tap
        if (COEFS[k] != 0) begin : g_mul
          lut_scaler #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF(COEFS[k]),
                       .OUT_W(PRW)) u_scale (
            .clk(clk), .rst(rst), .x(in_q[r]), .y(prod[r][k]));
        end else begin : g_zero
          assign prod[r][k] = '0;
        end
      end
    end

    for (genvar j = 0; j < P; j++) begin : g_out
      if (OUT_MASK[j]) begin : g_on
        // acc[m]: partial sum of the terms of column m and beyond; each
        // register is both the pipeline register after an add and a z^-8.
        // The terms of one column (at most one per input element r, tap
        // k = 8m + r - j) first pass an adder tree of equal depth for all
        // columns, which keeps the columns aligned.
        logic signed [ACCW-1:0] acc [M+2];
        assign acc[M+1] = '0;
        for (genvar m = 0; m <= M; m++) begin : g_col
          logic signed [ACCW-1:0] slot [P];
          logic signed [ACCW-1:0] csum;
          always_comb begin
            for (int r = 0; r < P; r++) begin
              int k;
              k = P * m + r - j;
              if (k < 0 || k >= L)  slot[r] = '0;
              else if (share_neg(k)) slot[r] = -ACCW'(prod[r][share_index(k)]);
              else                   slot[r] = ACCW'(prod[r][share_index(k)]);
            end
          end
          pipe_add_tree #(.N(P), .W(ACCW)) u_col (
            .clk(clk), .rst(rst), .in(slot), .sum(csum));
          always_ff @(posedge clk) begin
            if (rst) acc[m] <= '0;
            else     acc[m] <= acc[m+1] + csum;
          end
        end
        assign acc_out[j] = acc[0];
      end else begin : g_off
        assign acc_out[j] = '0;
      end
    end
  end

  // Output rounding and saturation register.
  always_ff @(posedge clk) begin
    if (rst) y <= '{default: '0};
    else
      for (int j = 0; j < P; j++)
        y[j] <= OUT_MASK[j] ? OUT_W'(round_sat(longint'(acc_out[j]), FRAC, OUT_W)) : '0;
  end

endmodule
