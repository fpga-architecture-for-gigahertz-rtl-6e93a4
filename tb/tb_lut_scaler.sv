// tb_lut_scaler: checks constant scaling by 4-bit lookup tables.
//  u0: 12-bit data, 6-bit coefficient -27, exact (identical shifted tables)
//  u1: 12-bit data, 6-bit coefficient 31, exact
//  u2: 14-bit data, 16-bit coefficient 23170 (0.7071 * 2^15), products
//      rounded at 2^11 in each table (per-piece rounded tables)
// Exact modes must equal x*c; the rounded mode must equal the sum of the
// per-piece rounded products and lie within 2 units of x*c/2^11. Results
// must appear three clocks after the input (tables, two adder levels).
module tb_lut_scaler;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic signed [11:0] x12;
  logic signed [13:0] x14;
  logic signed [19:0] y0, y1, y2;

  lut_scaler #(.DATA_W(12), .COEF_W(6), .COEF(-27), .OUT_W(20)) u0 (.clk, .rst, .x(x12), .y(y0));
  lut_scaler #(.DATA_W(12), .COEF_W(6), .COEF(31),  .OUT_W(20)) u1 (.clk, .rst, .x(x12), .y(y1));
  lut_scaler #(.DATA_W(14), .COEF_W(16), .COEF(23170), .PREC_PRODUCT(1'b1),
               .DROP(11), .OUT_W(20)) u2 (.clk, .rst, .x(x14), .y(y2));

  int checks = 0, failures = 0;

  function automatic longint rounded_model(longint x);
    longint s = 0, p;
    for (int k = 0; k < 4; k++) begin
      longint piece;
      piece = (x >>> (4 * k)) & 15;
      if (k == 3 && piece >= 8) piece -= 16;
      p = (piece * 23170) <<< (4 * k);
      s += (p + 1024) >>> 11;
    end
    return s;
  endfunction

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s got %0d exp %0d", what, got, exp);
    end
  endtask

  longint h12 [3], h14 [3];

  initial begin
    x12 = '0; x14 = '0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i >= 3) begin
        longint e2;
        check(y0, h12[2] * -27, "u0");
        check(y1, h12[2] * 31, "u1");
        e2 = rounded_model(h14[2]);
        check(y2, e2, "u2");
        checks++;
        if (y2 * 2048 - h14[2] * 23170 > 2 * 2048 || h14[2] * 23170 - y2 * 2048 > 2 * 2048)
          failures++;
      end
      h12[2] = h12[1]; h14[2] = h14[1];
      h12[1] = h12[0]; h14[1] = h14[0];
      case (i % 5)
        0: begin x12 = 12'sh800; x14 = 14'sh2000; end  // most negative
        1: begin x12 = 12'sh7ff; x14 = 14'sh1fff; end  // most positive
        default: begin
          x12 = 12'($urandom());
          x14 = 14'($urandom());
        end
      endcase
      h12[0] = longint'(x12); h14[0] = longint'(x14);
    end
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
