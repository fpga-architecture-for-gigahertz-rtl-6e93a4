// tb_reg_lut: checks the registered 16-word table. Contents are word
// a -> (37*a + 5) mod 2^10; random addresses must come back one clock later,
// and the reset must clear the register.
module tb_reg_lut;
  localparam int W = 10;

  function automatic logic [1023:0] image();
    logic [1023:0] img = '0;
    for (int a = 0; a < 16; a++) img[a*64 +: 64] = 64'((37 * a + 5) % 1024);
    return img;
  endfunction

  logic clk = 0, rst = 1;
  logic [3:0] addr = '0;
  logic [W-1:0] q;
  always #4 clk = ~clk;

  reg_lut #(.W(W), .CONTENTS(image())) dut (.clk, .rst, .addr, .q);

  int checks = 0, failures = 0;

  initial begin
    logic [3:0] prev;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (q != '0) failures++;
    rst = 0;
    prev = addr;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i > 0) checks++;
      if (i > 0 && q != W'((37 * prev + 5) % 1024)) begin
        failures++;
        $display("MISMATCH addr %0d q %0d", prev, q);
      end
      addr = 4'($urandom_range(0, 15));
      prev = addr;
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
