// tb_polyphase_fir: self-checking test of the 8-phase block FIR.
//
// Five instances share one random input stream: the 19-tap even-symmetric
// example filter in transposed and in direct form, the 27-tap odd-symmetric
// halfband imaginary part in direct form with only the even-index outputs
// built (decimation by two), a 14-tap filter without symmetry in transposed
// form, and the halfband imaginary part again in transposed form (shared,
// negated products). Every built output is compared with a sample-by-sample
// convolution of the stored input (samples before the first block are zero),
// rounded and saturated the same way; the first valid output must appear
// exactly the expected number of clocks after the first valid input
// (10 for the direct and 9 for the transposed form with 12-bit data).
module tb_polyphase_fir;
  import ddc_pkg::*;

  localparam int NBLK  = 400;
  localparam int DW    = 12;
  localparam int OW    = 13;
  localparam coef_array_t C19 = '{-3, 7, -14, 25, -41, 66, -110, 205, -640, 1800,
                                  -640, 205, -110, 66, -41, 25, -14, 7, -3,
                                  0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam coef_array_t C14 = '{37, -5, 900, -1200, 13, 2047, -2048, 1, 0, -77,
                                  640, -3, 11, -900, 0, 0, 0, 0, 0, 0,
                                  0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  logic clk = 0, rst = 1, in_valid = 0;
  always #4 clk = ~clk;

  logic signed [DW-1:0] x [P];
  int xs [NBLK*P];

  logic                 v [5];
  logic signed [OW-1:0] y [5][P];

  polyphase_fir #(.L(19), .DATA_W(DW), .COEF_W(12), .COEFS(C19), .SYM(SYM_EVEN),
                  .FORM(FORM_TRANSPOSED), .FRAC(11), .OUT_W(OW)) u0 (
    .clk, .rst, .in_valid, .x, .out_valid(v[0]), .y(y[0]));
  polyphase_fir #(.L(19), .DATA_W(DW), .COEF_W(12), .COEFS(C19), .SYM(SYM_EVEN),
                  .FORM(FORM_DIRECT), .FRAC(11), .OUT_W(OW)) u1 (
    .clk, .rst, .in_valid, .x, .out_valid(v[1]), .y(y[1]));
  polyphase_fir #(.L(HB_TAPS), .DATA_W(DW), .COEF_W(HB_COEF_W), .COEFS(HB_COEFS),
                  .SYM(SYM_ODD), .FORM(FORM_DIRECT), .OUT_MASK(DECIM_MASK),
                  .FRAC(HB_FRAC - 1), .OUT_W(OW)) u2 (
    .clk, .rst, .in_valid, .x, .out_valid(v[2]), .y(y[2]));
  polyphase_fir #(.L(14), .DATA_W(DW), .COEF_W(12), .COEFS(C14), .SYM(SYM_NONE),
                  .FORM(FORM_TRANSPOSED), .FRAC(9), .OUT_W(OW)) u3 (
    .clk, .rst, .in_valid, .x, .out_valid(v[3]), .y(y[3]));
  polyphase_fir #(.L(HB_TAPS), .DATA_W(DW), .COEF_W(HB_COEF_W), .COEFS(HB_COEFS),
                  .SYM(SYM_ODD), .FORM(FORM_TRANSPOSED), .OUT_MASK(DECIM_MASK),
                  .FRAC(HB_FRAC - 1), .OUT_W(OW)) u4 (
    .clk, .rst, .in_valid, .x, .out_valid(v[4]), .y(y[4]));

  int checks = 0, failures = 0;
  int cycle = 0, first_in = -1;
  int first_out [5] = '{-1, -1, -1, -1, -1};
  int oblk [5] = '{0, 0, 0, 0, 0};
  int sat_seen = 0;

  function automatic int coef(int d, int k);
    return (d < 2) ? C19[k] : (d == 2 || d == 4) ? HB_COEFS[k] : C14[k];
  endfunction

  function automatic longint conv(int d, int idx);
    longint s = 0;
    for (int k = 0; k < dut_len(d); k++)
      if (idx - k >= 0) s += longint'(coef(d, k)) * longint'(xs[idx - k]);
    return s;
  endfunction

  function automatic int dut_len(int d);
    return (d < 2) ? 19 : (d == 2 || d == 4) ? HB_TAPS : 14;
  endfunction
  function automatic int dut_frac(int d);
    return (d < 2) ? 11 : (d == 2 || d == 4) ? HB_FRAC - 1 : 9;
  endfunction
  function automatic int dut_lat(int d);
    return (d == 1 || d == 2) ? 10 : 9;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int d = 0; d < 5; d++) begin
      if (v[d] && !rst) begin
        if (first_out[d] < 0) first_out[d] = cycle;
        for (int j = 0; j < P; j++) begin
          if ((d != 2 && d != 4) || DECIM_MASK[j]) begin
            longint full, e;
            full = conv(d, P * oblk[d] + P - 1 - j);
            e = round_sat(full, dut_frac(d), OW);
            if (e != round_sat(full, dut_frac(d), 64)) sat_seen++;
            checks++;
            if (longint'(y[d][j]) != e) begin
              failures++;
              if (failures < 10)
                $display("MISMATCH dut %0d blk %0d j %0d got %0d exp %0d",
                         d, oblk[d], j, y[d][j], e);
            end
          end else begin
            checks++;
            if (y[d][j] != '0) failures++;
          end
        end
        oblk[d] = oblk[d] + 1;
      end
    end
  end

  initial begin
    for (int r = 0; r < P; r++) x[r] = '0;
    repeat (8) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < NBLK; t++) begin
      @(negedge clk);
      for (int r = 0; r < P; r++) begin
        int s;
        // Mostly random; every 50th block full scale to reach saturation.
        s = (t % 50 == 7) ? ((r % 2) ? -2048 : 2047) : int'($urandom_range(0, 4095)) - 2048;
        xs[P * t + P - 1 - r] = s;
        x[r] = DW'(s);
      end
      in_valid = 1;
      if (first_in < 0) first_in = cycle;
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (first_out[d] - first_in != dut_lat(d)) begin
        failures++;
        $display("LATENCY dut %0d: %0d clocks, expected %0d", d, first_out[d] - first_in, dut_lat(d));
      end
      checks++;
      if (oblk[d] != NBLK) begin
        failures++;
        $display("COUNT dut %0d: %0d blocks", d, oblk[d]);
      end
    end
    $display("saturated outputs seen: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
