// pipe_add_tree: sum of N signed words through a tree of two-input adders
// with a register after every adder level.
//
// The operands are zero-padded to the next power of two, N2; level s holds
// N2 >> s partial sums, each the registered sum of two sums of level s-1.
// Padding adds only constant zeros, which synthesis removes. The result
// appears tree_latency(N) = max(1, ceil(log2 N)) clocks after the operands
// (a single operand still passes one register). W must hold the full sum;
// nothing saturates. Registering every addition keeps each stage to one
// adder, the rule for running the fabric at its highest clock rate; the tree
// shape and the reset are this design's choices.
module pipe_add_tree
  import ddc_pkg::tree_latency;
#(
  parameter int N = 4,
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] in  [N],
  output logic signed [W-1:0] sum
);

  localparam int D  = tree_latency(N);
  localparam int N2 = 1 << D;

  logic signed [W-1:0] lv0 [N2];
  logic signed [W-1:0] r   [D][N2/2];

  always_comb begin
    for (int i = 0; i < N2; i++) lv0[i] = (i < N) ? in[i] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) r <= '{default: '0};
    else begin
      for (int i = 0; i < N2 / 2; i++) r[0][i] <= lv0[2*i] + lv0[2*i+1];
      for (int s = 1; s < D; s++)
        for (int i = 0; i < N2 / 4; i++)
          if (i < (N2 >> (s + 1))) r[s][i] <= r[s-1][2*i] + r[s-1][2*i+1];
          else                     r[s][i] <= '0;
    end
  end

  assign sum = r[D-1][0];

endmodule
