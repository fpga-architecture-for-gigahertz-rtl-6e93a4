// lut_scaler: multiplication of a data word by a constant with lookup tables.
//
// The DATA_W-bit two's-complement input is cut into 4-bit pieces. Each piece
// addresses one registered 16-word table (reg_lut) holding that piece times
// the coefficient; the table outputs are then shifted by their bit position
// and added in a pipelined adder tree (pipe_add_tree), one register after
// every adder level. Sign is handled by reading the top piece
// as a signed number and the others as unsigned.
//
// Two precision modes:
//  * PREC_COEF (finite-precision coefficient): COEF is an integer, all tables
//    hold the same exact products piece*COEF and their outputs are shifted
//    by 4*k; the result is exactly x*COEF.
//  * PREC_PRODUCT (finite-precision products): COEF carries more precision
//    than is kept. Table k holds round(piece * COEF * 2^(4k) / 2^DROP), so
//    each table differs, is only as wide as its rounded product needs, and
//    the tables are added without further shifts; the result approximates
//    x*COEF/2^DROP with at most one unit of rounding error per piece.
//
// Interface: x in, y out, OUT_W bits, scaler_latency(DATA_W) clocks later
// (ddc_pkg: one for the tables plus ceil(log2(pieces)); 3 for 12 to 16 bits).
// OUT_W must hold the full result; it is not saturated.
// The 4-bit pieces, the two modes and the widths of the default (12-bit data,
// 6-bit coefficient, 20-bit result) follow the published design; signed
// handling, the reset and the adder-tree shape are this design's choices.
module lut_scaler #(
  parameter int DATA_W = 12,
  parameter int COEF_W = 6,
  parameter int COEF   = 27,
  parameter bit PREC_PRODUCT = 1'b0,
  parameter int DROP   = 0,
  parameter int OUT_W  = 20
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [DATA_W-1:0] x,
  output logic signed [OUT_W-1:0]  y
);

  localparam int NCH  = (DATA_W + 3) / 4;
  localparam int XW   = NCH * 4;
  // Width of an exact piece product, signed.
  localparam int PW   = 4 + COEF_W + 1;

  // Contents of table k as sixteen 64-bit words.
  function automatic logic [1023:0] table_image(int k);
    logic [1023:0] img;
    longint v, p;
    img = '0;
    for (int a = 0; a < 16; a++) begin
      v = (k == NCH - 1 && a >= 8) ? longint'(a) - 16 : longint'(a);
      p = v * longint'(COEF);
      if (PREC_PRODUCT) begin
        p = p <<< (4 * k);
        if (DROP > 0) p = (p + (64'sd1 <<< (DROP - 1))) >>> DROP;
      end
      img[a*64 +: 64] = p;
    end
    return img;
  endfunction

  // Table width: exact piece product, or the rounded, position-weighted one.
  function automatic int table_width(int k);
    int w;
    w = PREC_PRODUCT ? PW + 4 * k - DROP : PW;
    return (w < 2) ? 2 : w;
  endfunction

  logic signed [XW-1:0] xs;
  assign xs = XW'(x);  // sign-extend to whole pieces

  logic signed [OUT_W-1:0] term [NCH];

  for (genvar k = 0; k < NCH; k++) begin : g_piece
    localparam int LW = table_width(k);
    logic signed [LW-1:0] q;
    reg_lut #(.W(LW), .CONTENTS(table_image(k))) u_lut (
      .clk (clk),
      .rst (rst),
      .addr(xs[4*k +: 4]),
      .q   (q)
    );
    if (PREC_PRODUCT) begin : g_prod
      assign term[k] = OUT_W'(q);
    end else begin : g_coef
      assign term[k] = OUT_W'(q) <<< (4 * k);
    end
  end

  pipe_add_tree #(.N(NCH), .W(OUT_W)) u_sum (
    .clk(clk), .rst(rst), .in(term), .sum(y));

endmodule
