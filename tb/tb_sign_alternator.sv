// tb_sign_alternator: checks multiplication by (-1)^m for 4 lanes (fixed
// pattern: lanes 0 and 2 hold odd indices) and for 3 lanes (pattern flips
// every valid block), with saturation of the most negative value and one
// clock of latency.
module tb_sign_alternator;
  logic clk = 0, rst = 1, in_valid = 0;
  always #4 clk = ~clk;

  logic signed [15:0] i4 [4], q4 [4], oi4 [4], oq4 [4];
  logic signed [15:0] i3 [3], q3 [3], oi3 [3], oq3 [3];
  logic v4, v3;

  sign_alternator #(.LANES(4), .W(16)) u4 (.clk, .rst, .in_valid, .i_in(i4), .q_in(q4),
                                           .out_valid(v4), .i_out(oi4), .q_out(oq4));
  sign_alternator #(.LANES(3), .W(16)) u3 (.clk, .rst, .in_valid, .i_in(i3), .q_in(q3),
                                           .out_valid(v3), .i_out(oi3), .q_out(oq3));

  int checks = 0, failures = 0, negated = 0;

  function automatic logic signed [15:0] ref_val(logic signed [15:0] v, int idx);
    if (idx % 2 == 0) return v;
    return (v == -16'sd32768) ? 16'sd32767 : -v;
  endfunction

  task automatic chk(logic signed [15:0] got, logic signed [15:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH got %0d exp %0d", got, exp);
    end
  endtask

  initial begin
    logic signed [15:0] pi4 [4], pq4 [4], pi3 [3], pq3 [3];
    int blk, pblk;
    for (int l = 0; l < 4; l++) begin i4[l] = '0; q4[l] = '0; end
    for (int l = 0; l < 3; l++) begin i3[l] = '0; q3[l] = '0; end
    repeat (4) @(posedge clk);
    #1 rst = 0;
    blk = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (i >= 1) begin
        chk(logic'(v4), 1'b1);
        for (int l = 0; l < 4; l++) begin
          chk(oi4[l], ref_val(pi4[l], 4 * pblk + 3 - l));
          chk(oq4[l], ref_val(pq4[l], 4 * pblk + 3 - l));
        end
        for (int l = 0; l < 3; l++) begin
          chk(oi3[l], ref_val(pi3[l], 3 * pblk + 2 - l));
          chk(oq3[l], ref_val(pq3[l], 3 * pblk + 2 - l));
          if ((3 * pblk + 2 - l) % 2 == 1) negated++;
        end
      end
      for (int l = 0; l < 4; l++) begin
        i4[l] = (i % 7 == 3) ? -16'sd32768 : 16'($urandom());
        q4[l] = 16'($urandom());
        pi4[l] = i4[l]; pq4[l] = q4[l];
      end
      for (int l = 0; l < 3; l++) begin
        i3[l] = (i % 5 == 2) ? -16'sd32768 : 16'($urandom());
        q3[l] = 16'($urandom());
        pi3[l] = i3[l]; pq3[l] = q3[l];
      end
      in_valid = 1;
      pblk = blk;
      blk++;
    end
    checks++;
    if (negated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
