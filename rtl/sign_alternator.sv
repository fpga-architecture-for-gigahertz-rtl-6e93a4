// sign_alternator: frequency shift of a complex stream by half its sample
// rate, i.e. multiplication by (-1)^m.
//
// After decimation by two the wanted band sits at a quarter of the 1 GS/s
// input rate, which is half the new 500 MS/s rate; multiplying sample m by
// (-1)^m moves it to 0 Hz, so no quadrature carrier or multiplier is needed.
// Lane l of a block of LANES samples holds sample index LANES*t + LANES-1-l
// (lane 0 newest). With an even lane count the negated lanes are fixed (the
// odd indices); with an odd count a phase bit flips every valid block.
// Negating the most negative value saturates to the largest positive one.
// Timing: one register, one clock of latency; out_valid follows in_valid.
// The (-1)^m shift follows the published design; the lane layout, the
// saturation and the generality in LANES are this design's choices.
module sign_alternator #(
  parameter int LANES = 4,
  parameter int W     = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_in  [LANES],
  input  logic signed [W-1:0] q_in  [LANES],
  output logic                out_valid,
  output logic signed [W-1:0] i_out [LANES],
  output logic signed [W-1:0] q_out [LANES]
);

  localparam logic signed [W-1:0] MOST_NEG = {1'b1, {(W-1){1'b0}}};
  localparam logic signed [W-1:0] MOST_POS = {1'b0, {(W-1){1'b1}}};

  // Parity of the index of lane 0's sample block base (odd LANES only).
  logic phase;

  function automatic logic signed [W-1:0] neg_sat(logic signed [W-1:0] v);
    return (v == MOST_NEG) ? MOST_POS : -v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      i_out     <= '{default: '0};
      q_out     <= '{default: '0};
    end else begin
      out_valid <= in_valid;
      if (in_valid && (LANES % 2 == 1)) phase <= ~phase;
      for (int l = 0; l < LANES; l++) begin
        if (phase ^ logic'((LANES - 1 - l) % 2)) begin
          i_out[l] <= neg_sat(i_in[l]);
          q_out[l] <= neg_sat(q_in[l]);
        end else begin
          i_out[l] <= i_in[l];
          q_out[l] <= q_in[l];
        end
      end
    end
  end

endmodule
