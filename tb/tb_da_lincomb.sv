// tb_da_lincomb: checks the lookup-table linear combination.
//  u0: eight 12-bit words, four words per table, one bit position per table
//      (two distinct tables per bit position)
//  u1: six 10-bit words, two words and two bit positions per table (15 tables)
//  u2: eight 12-bit words through a window of a longer coefficient array
//      (COEF_BASE = -3: the first three words get zero coefficients)
// Every result must be the exact sum of products, one clock after the input
// for the tables plus one per adder-tree level: 6 clocks for u0 and u2 (24
// tables), 5 for u1 (15 tables).
module tb_da_lincomb;
  import ddc_pkg::*;

  localparam coef_array_t CA = '{1000, -2048, 7, 8191, -8192, 333, -1, 4095,
    0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam coef_array_t CB = '{-300, 511, 17, -512, 100, 255,
    0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic signed [11:0] xa [8];
  logic signed [9:0]  xb [6];
  logic signed [28:0] ya, yc;
  logic signed [23:0] yb;

  da_lincomb #(.N_WORDS(8), .DATA_W(12), .WPL(4), .BPL(1), .COEF_W(14),
               .COEFS(CA), .N_COEFS(8), .COEF_BASE(0), .OUT_W(29)) u0 (.clk, .rst, .x(xa), .y(ya));
  da_lincomb #(.N_WORDS(6), .DATA_W(10), .WPL(2), .BPL(2), .COEF_W(11),
               .COEFS(CB), .N_COEFS(6), .COEF_BASE(0), .OUT_W(24)) u1 (.clk, .rst, .x(xb), .y(yb));
  da_lincomb #(.N_WORDS(8), .DATA_W(12), .WPL(4), .BPL(1), .COEF_W(14),
               .COEFS(CA), .N_COEFS(8), .COEF_BASE(-3), .OUT_W(29)) u2 (.clk, .rst, .x(xa), .y(yc));

  int checks = 0, failures = 0;

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s got %0d exp %0d", what, got, exp);
    end
  endtask

  longint ea [600], eb [600], ec [600];

  initial begin
    for (int w = 0; w < 8; w++) xa[w] = '0;
    for (int w = 0; w < 6; w++) xb[w] = '0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i >= 6) begin
        chk(ya, ea[i - 6], "u0");
        chk(yc, ec[i - 6], "u2");
      end
      if (i >= 5) chk(yb, eb[i - 5], "u1");
      ea[i] = 0; eb[i] = 0; ec[i] = 0;
      for (int w = 0; w < 8; w++) begin
        xa[w] = (i % 9 == 4) ? 12'sh800 : (i % 9 == 5) ? 12'sh7ff : 12'($urandom());
        ea[i] += longint'(CA[w]) * longint'(xa[w]);
        if (w >= 3) ec[i] += longint'(CA[w - 3]) * longint'(xa[w]);
      end
      for (int w = 0; w < 6; w++) begin
        xb[w] = (i % 9 == 4) ? 10'sh200 : 10'($urandom());
        eb[i] += longint'(CB[w]) * longint'(xb[w]);
      end
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
