// tb_ddc_top: end-to-end test of the downconverter at its default sizes.
//
// Three input phases, one continuous stream of 8-sample blocks:
//   1. random full-range samples (and a few full-scale blocks);
//   2. a real tone at 800 MHz (1 GS/s), i.e. 50 MHz above the 750 MHz centre;
//   3. a real tone at 700 MHz, 50 MHz below it.
// Every output sample is compared bit for bit with a sample-by-sample model
// of the chain: equalizer convolution, rounding to 14 bits; halfband filter at
// even indices only (I = centre tap, Q = odd part), rounding to 16 bits;
// multiplication by (-1)^m. The tones check what the chain is for: at
// baseband the 800 MHz tone must rotate at +50 MHz (0.1 cycle per 500 MS/s
// sample) and the 700 MHz tone at -50 MHz, each with its mirror frequency at
// least 40 dB weaker (image suppression). Mechanism counters: decimation (4
// outputs per 8 inputs, every block), sign alternation actually applied to a
// nonzero sample, image suppression observed in both tone phases. The latency
// must be 20 clocks.
module tb_ddc_top;
  import ddc_pkg::*;

  localparam int NRAND = 200;
  localparam int NTONE = 150;
  localparam int NBLK  = NRAND + 2 * NTONE;
  localparam int NOUT  = NBLK * P / 2;
  // 9 (equalizer) + 10 (halfband) + 1 (sign alternation)
  localparam int LATENCY = 20;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  always #4 clk = ~clk;

  logic signed [11:0] x_in [P];
  logic signed [15:0] i_out [P/2], q_out [P/2];

  ddc_top dut (.clk, .rst, .in_valid, .x_in, .out_valid, .i_out, .q_out);

  int  xs  [NBLK*P];
  int  eqs [NBLK*P];
  int  bi  [NOUT], bq [NOUT];   // model baseband output
  int  gi  [NOUT], gq [NOUT];   // captured output

  int checks = 0, failures = 0, cycle = 0, first_in = -1, first_out = -1, oblk = 0;
  int n_decim = 0, n_alt = 0, n_image = 0;

  function automatic longint xv(int i);
    return (i >= 0) ? longint'(xs[i]) : 0;
  endfunction
  function automatic longint ev(int i);
    return (i >= 0) ? longint'(eqs[i]) : 0;
  endfunction

  // Sample-by-sample model of the whole chain.
  task automatic build_model();
    for (int i = 0; i < NBLK * P; i++) begin
      longint s = 0;
      for (int k = 0; k < EQ_TAPS; k++) s += longint'(EQ_COEFS[k]) * xv(i - k);
      eqs[i] = int'(round_sat(s, EQ_FRAC, 14));
    end
    for (int m = 0; m < NOUT; m++) begin
      longint s = 0;
      int iv, qv;
      for (int k = 0; k < HB_TAPS; k++) s += longint'(HB_COEFS[k]) * ev(2 * m - k);
      iv = int'(ev(2 * m - HB_CENTER));
      qv = int'(round_sat(s, HB_FRAC - 1, 16));
      if (m % 2 == 1) begin
        iv = (iv == -32768) ? 32767 : -iv;
        qv = (qv == -32768) ? 32767 : -qv;
      end
      bi[m] = iv; bq[m] = qv;
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (out_valid && !rst && oblk < NBLK) begin
      if (first_out < 0) first_out = cycle;
      n_decim++;
      for (int l = 0; l < P/2; l++) begin
        gi[4 * oblk + 3 - l] = int'(i_out[l]);
        gq[4 * oblk + 3 - l] = int'(q_out[l]);
      end
      oblk++;
    end
  end

  // Power of the captured output at +f and -f (cycles per output sample).
  task automatic tone_check(int m0, int n, real f, string what);
    real cpr, cpi, cnr, cni, pp, pn, ratio_db;
    cpr = 0; cpi = 0; cnr = 0; cni = 0;
    for (int m = m0; m < m0 + n; m++) begin
      real c, s;
      c = $cos(2 * PI * f * m);
      s = $sin(2 * PI * f * m);
      // (gi + j gq) * e^{-j w m} and * e^{+j w m}
      cpr += gi[m] * c + gq[m] * s;  cpi += gq[m] * c - gi[m] * s;
      cnr += gi[m] * c - gq[m] * s;  cni += gq[m] * c + gi[m] * s;
    end
    pp = cpr * cpr + cpi * cpi;
    pn = cnr * cnr + cni * cni;
    ratio_db = 10 * $log10((pp + 1.0) / (pn + 1.0));
    $display("%s: wanted/mirror = %0.1f dB, wanted amplitude %0.1f", what, ratio_db,
             $sqrt(pp) / n);
    checks++;
    if (ratio_db < 40.0) failures++;
    else n_image++;
  endtask

  initial begin
    for (int r = 0; r < P; r++) x_in[r] = '0;
    // Stimulus, stored ahead so that the model is ready when outputs arrive.
    for (int t = 0; t < NBLK; t++) begin
      for (int r = 0; r < P; r++) begin
        int idx, s;
        idx = P * t + P - 1 - r;
        if (t < NRAND)
          s = (t % 50 == 20) ? ((r % 2) ? -2048 : 2047) : int'($urandom_range(0, 4095)) - 2048;
        else if (t < NRAND + NTONE)
          s = int'($rtoi(1500.0 * $cos(2 * PI * 0.8 * idx) + 1500.5)) - 1500;
        else
          s = int'($rtoi(1500.0 * $cos(2 * PI * 0.7 * idx) + 1500.5)) - 1500;
        xs[idx] = s;
      end
    end
    build_model();

    repeat (6) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < NBLK; t++) begin
      @(negedge clk);
      for (int r = 0; r < P; r++) x_in[r] = 12'(xs[P * t + P - 1 - r]);
      in_valid = 1;
      if (first_in < 0) first_in = cycle;
    end
    @(negedge clk) in_valid = 0;
    repeat (LATENCY + 4) @(posedge clk);

    // Bit-true comparison of every output sample.
    for (int m = 0; m < NOUT; m++) begin
      checks += 2;
      if (gi[m] != bi[m] || gq[m] != bq[m]) begin
        failures++;
        if (failures < 10) $display("MISMATCH m %0d got (%0d,%0d) exp (%0d,%0d)", m, gi[m], gq[m], bi[m], bq[m]);
      end
      if (m % 2 == 1 && gi[m] != 0) n_alt++;
    end
    // Tones: skip 50 blocks of settling, then 100 blocks = 400 samples.
    tone_check(4 * (NRAND + 50), 400, 0.1, "800 MHz tone at +50 MHz");
    tone_check(4 * (NRAND + NTONE + 50), 400, -0.1, "700 MHz tone at -50 MHz");

    checks++;
    if (first_out - first_in != LATENCY) begin
      failures++;
      $display("LATENCY %0d expected %0d", first_out - first_in, LATENCY);
    end
    checks++;
    if (n_decim != NBLK) failures++;
    checks++;
    if (n_alt == 0) failures++;
    checks++;
    if (n_image != 2) failures++;
    $display("mechanisms: decimated blocks %0d, sign alternations %0d, image suppressions %0d",
             n_decim, n_alt, n_image);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK + 500) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
