// reg_lut: a registered lookup table of any output width.
//
// Four address lines select one of 16 words; each of the W output bits is a
// four-input programmable logic function of the address (one FPGA logic
// cell), and all W bits are captured in the register paired with that logic,
// so a table of any width is a row of such cells sharing the address. The
// contents are fixed at elaboration through CONTENTS, which holds sixteen
// 64-bit words (word a in bits [a*64 +: 64]); the table keeps the low W bits
// of each. The output follows the address by one clock. The synchronous
// reset that clears the register is this design's own addition, so that a
// pipeline built from these tables starts from zero.
module reg_lut #(
  parameter int            W        = 8,
  parameter logic [1023:0] CONTENTS = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [3:0]   addr,
  output logic [W-1:0] q
);

  logic [W-1:0] word;

  // The programmable logic: one 16-entry truth table per output bit.
  always_comb word = CONTENTS[{addr, 6'd0} +: W];

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= word;
  end

endmodule
