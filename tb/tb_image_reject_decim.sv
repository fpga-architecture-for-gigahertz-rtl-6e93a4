// tb_image_reject_decim: checks the halfband image-suppression filter with
// decimation by two against a direct model: for lane l of block t the output
// index is i = 8t+6-2l (even), i_out = x(i-13) and
// q_out = round(sum_k HB_COEFS[k] x(i-k) / 2^11), saturated to 16 bits.
// Random and full-scale inputs; the latency must be 10 clocks.
module tb_image_reject_decim;
  import ddc_pkg::*;

  localparam int NBLK = 400;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  always #4 clk = ~clk;

  logic signed [13:0] x [P];
  logic signed [15:0] i_out [P/2], q_out [P/2];
  int xs [NBLK*P];

  image_reject_decim dut (.clk, .rst, .in_valid, .x, .out_valid, .i_out, .q_out);

  int checks = 0, failures = 0, cycle = 0, first_in = -1, first_out = -1, oblk = 0;

  function automatic longint xv(int i);
    return (i >= 0) ? longint'(xs[i]) : 0;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (out_valid && !rst) begin
      if (first_out < 0) first_out = cycle;
      for (int l = 0; l < P/2; l++) begin
        longint full;
        int idx;
        idx = P * oblk + P - 2 - 2 * l;
        full = 0;
        for (int k = 0; k < HB_TAPS; k++) full += longint'(HB_COEFS[k]) * xv(idx - k);
        checks += 2;
        if (longint'(i_out[l]) != xv(idx - HB_CENTER)) begin
          failures++;
          if (failures < 10) $display("I MISMATCH blk %0d l %0d got %0d exp %0d", oblk, l, i_out[l], xv(idx - 13));
        end
        if (longint'(q_out[l]) != round_sat(full, HB_FRAC - 1, 16)) begin
          failures++;
          if (failures < 10) $display("Q MISMATCH blk %0d l %0d got %0d exp %0d", oblk, l, q_out[l],
                                      round_sat(full, HB_FRAC - 1, 16));
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
        s = (t % 30 == 4) ? ((r % 4 < 2) ? 8191 : -8192) : int'($urandom_range(0, 16383)) - 8192;
        xs[P * t + P - 1 - r] = s;
        x[r] = 14'(s);
      end
      in_valid = 1;
      if (first_in < 0) first_in = cycle;
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (first_out - first_in != 10) begin
      failures++;
      $display("LATENCY %0d", first_out - first_in);
    end
    checks++;
    if (oblk != NBLK) failures++;
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
