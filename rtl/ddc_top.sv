// ddc_top: wideband IF-to-baseband downconverter, 1 GS/s real input at
// 125 MHz, 8 samples per clock in, 4 complex baseband samples per clock out.
//
// The sampler delivers the real IF signal (a 400 MHz band around 750 MHz,
// which the 1 GHz sampling leaves in place between 550 and 950 MHz). Three
// stages follow, all in 8-phase (block) form so that the FPGA runs at one
// eighth of the sample rate:
//   1. eq_fir             14-tap real equalizer of the analog RF/IF filters;
//   2. image_reject_decim halfband filter keeping the positive-frequency
//                         (750 MHz) band and discarding its mirror, computed
//                         only at every second sample: decimation by two;
//   3. sign_alternator    multiplication by (-1)^m, which moves the band from
//                         250 MHz at 500 MS/s down to 0 Hz.
// The outputs are i(m) + j q(m), 500 MS/s complex, four per clock.
//
// Interface: x_in[r] = x(n-r), r = 0..7, one block per clock with in_valid
// (the stream is expected to be continuous; in_valid only marks which output
// blocks are meaningful). Lane l of i_out/q_out is baseband sample 4t+3-l of
// the output stream (lane 0 newest), in OUT_W-bit two's complement with one
// fractional bit. Latency: eq_latency(IN_W) + fir_latency(FORM_DIRECT,
// EQ_W, 27, SYM_ODD) + 1 = 9 + 10 + 1 = 20 clocks at the defaults. Synchronous active-high reset clears every register; samples
// before the first valid block count as zero. The stage order and rates
// follow the published design; widths and the valid tag are this design's.
module ddc_top
  import ddc_pkg::*;
#(
  parameter int IN_W  = 12,
  parameter int EQ_W  = 14,
  parameter int OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in  [P],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] i_out [P/2],
  output logic signed [OUT_W-1:0] q_out [P/2]
);

  logic                    eq_valid, hb_valid;
  logic signed [EQ_W-1:0]  eq_y  [P];
  logic signed [OUT_W-1:0] hb_i  [P/2];
  logic signed [OUT_W-1:0] hb_q  [P/2];

  eq_fir #(.DATA_W(IN_W), .OUT_W(EQ_W)) u_eq (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x_in),
    .out_valid(eq_valid), .y(eq_y)
  );

  image_reject_decim #(.DATA_W(EQ_W), .OUT_W(OUT_W)) u_hb (
    .clk(clk), .rst(rst), .in_valid(eq_valid), .x(eq_y),
    .out_valid(hb_valid), .i_out(hb_i), .q_out(hb_q)
  );

  sign_alternator #(.LANES(P/2), .W(OUT_W)) u_shift (
    .clk(clk), .rst(rst), .in_valid(hb_valid), .i_in(hb_i), .q_in(hb_q),
    .out_valid(out_valid), .i_out(i_out), .q_out(q_out)
  );

endmodule
