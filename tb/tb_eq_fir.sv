// tb_eq_fir: checks the 14-tap equalizer against a sample-by-sample
// convolution with the same coefficients, rounding and saturation, over
// random and full-scale input blocks; the first valid output must follow the
// first valid input by 9 clocks.
module tb_eq_fir;
  import ddc_pkg::*;

  localparam int NBLK = 400;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  always #4 clk = ~clk;

  logic signed [11:0] x [P];
  logic signed [13:0] y [P];
  int xs [NBLK*P];

  eq_fir dut (.clk, .rst, .in_valid, .x, .out_valid, .y);

  int checks = 0, failures = 0, cycle = 0, first_in = -1, first_out = -1;
  int oblk = 0, sat_seen = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (out_valid && !rst) begin
      if (first_out < 0) first_out = cycle;
      for (int j = 0; j < P; j++) begin
        longint full, e;
        int idx;
        idx = P * oblk + P - 1 - j;
        full = 0;
        for (int k = 0; k < EQ_TAPS; k++)
          if (idx - k >= 0) full += longint'(EQ_COEFS[k]) * longint'(xs[idx - k]);
        e = round_sat(full, EQ_FRAC, 14);
        if (e != round_sat(full, EQ_FRAC, 64)) sat_seen++;
        checks++;
        if (longint'(y[j]) != e) begin
          failures++;
          if (failures < 10) $display("MISMATCH blk %0d j %0d got %0d exp %0d", oblk, j, y[j], e);
        end
      end
      oblk++;
    end
  end

  initial begin
    for (int r = 0; r < P; r++) x[r] = '0;
    repeat (6) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < NBLK; t++) begin
      @(negedge clk);
      for (int r = 0; r < P; r++) begin
        int s;
        s = (t % 40 == 9) ? 2047 : (t % 40 == 10) ? -2048 : int'($urandom_range(0, 4095)) - 2048;
        xs[P * t + P - 1 - r] = s;
        x[r] = 12'(s);
      end
      in_valid = 1;
      if (first_in < 0) first_in = cycle;
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (first_out - first_in != 9) begin
      failures++;
      $display("LATENCY %0d expected %0d", first_out - first_in, 9);
    end
    checks++;
    if (oblk != NBLK) failures++;
    // With these taps the largest output (sum |c| * 2048 / 2^11 = 4422)
    // fits 14 bits: saturation must never be needed.
    checks++;
    if (sat_seen != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
