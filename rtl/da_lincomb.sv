// da_lincomb: linear combination of N_WORDS data words by lookup tables
// addressed with the data bits (distributed arithmetic).
//
// y = sum_w c(w) * x[w], exact, for two's-complement x and integer
// coefficients c(w) = COEFS[COEF_BASE + w], taken as zero where that index
// falls outside 0..N_COEFS-1 (so a filter can hand each instance a window of
// one coefficient array). The words are cut into groups of WPL words and their bits into
// groups of BPL positions, with WPL*BPL = 4: every table (reg_lut) is driven
// by four data bits, BPL bit positions of each of WPL words, and holds the
// matching partial sum of coefficients for all 16 patterns of those bits. A
// bit at position b inside the group carries weight 2^b relative to the
// group's lowest bit; the sign bit of a word carries negative weight. The
// table outputs are shifted by their group's lowest bit position and added
// in a pipelined adder tree (pipe_add_tree).
//
// With WPL = 4, BPL = 1 and eight words, each bit position needs one copy of
// each of two distinct tables (words 0-3 and words 4-7), and no table input is
// left unused. WPL = 2, BPL = 2 with six 10-bit words gives 15 tables, each
// driven by two bit positions of two words, which keeps the range of
// positions per table, and so its output width, small. Any WPL*BPL = 4 split
// is accepted; words or bits past the end leave table inputs at zero.
//
// Timing: x in, y out da_latency(...) clocks later (ddc_pkg): one clock
// through the registered tables, ceil(log2(tables)) through the adder tree
// (6 for eight 12-bit words with four words per table). The table
// grouping follows the published structure; signed handling, the reset and
// the adder-tree shape are this design's choices.
module da_lincomb #(
  parameter int N_WORDS = 8,
  parameter int DATA_W  = 12,
  parameter int WPL     = 4,
  parameter int BPL     = 1,
  parameter int COEF_W  = 14,
  parameter ddc_pkg::coef_array_t COEFS = ddc_pkg::EQ_COEFS,
  parameter int N_COEFS = 8,
  parameter int COEF_BASE = 0,
  parameter int OUT_W   = DATA_W + COEF_W + 3
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x [N_WORDS],
  output logic signed [OUT_W-1:0]  y
);

  localparam int NWG = (N_WORDS + WPL - 1) / WPL;  // word groups
  localparam int NBG = (DATA_W + BPL - 1) / BPL;   // bit groups
  // Table word: coefficient, growth from WPL words and BPL positions, sign.
  localparam int LW  = COEF_W + $clog2(WPL) + BPL + 1;

  function automatic longint coef(int w);
    int i;
    i = COEF_BASE + w;
    return (i >= 0 && i < N_COEFS) ? longint'(COEFS[i]) : 64'sd0;
  endfunction

  // Address bit of word wi, position bi inside a table group.
  function automatic int abit(int wi, int bi);
    return wi * BPL + bi;
  endfunction

  function automatic logic [1023:0] table_image(int wg, int bg);
    logic [1023:0] img;
    longint s, c;
    int w, b;
    img = '0;
    for (int a = 0; a < 16; a++) begin
      s = 0;
      for (int wi = 0; wi < WPL; wi++) begin
        for (int bi = 0; bi < BPL; bi++) begin
          w = wg * WPL + wi;
          b = bg * BPL + bi;
          if (w < N_WORDS && b < DATA_W && a[abit(wi, bi)]) begin
            c = coef(w) <<< bi;
            s = (b == DATA_W - 1) ? s - c : s + c;
          end
        end
      end
      img[a*64 +: 64] = s;
    end
    return img;
  endfunction

  logic signed [OUT_W-1:0] term [NWG*NBG];

  for (genvar wg = 0; wg < NWG; wg++) begin : g_wg
    for (genvar bg = 0; bg < NBG; bg++) begin : g_bg
      logic [3:0]           addr;
      logic signed [LW-1:0] q;
      always_comb begin
        addr = '0;
        for (int wi = 0; wi < WPL; wi++)
          for (int bi = 0; bi < BPL; bi++)
            if (wg * WPL + wi < N_WORDS && bg * BPL + bi < DATA_W)
              addr[abit(wi, bi)] = x[wg * WPL + wi][bg * BPL + bi];
      end
      reg_lut #(.W(LW), .CONTENTS(table_image(wg, bg))) u_lut (
        .clk (clk),
        .rst (rst),
        .addr(addr),
        .q   (q)
      );
      assign term[wg * NBG + bg] = OUT_W'(q) <<< (bg * BPL);
    end
  end

  pipe_add_tree #(.N(NWG * NBG), .W(OUT_W)) u_sum (
    .clk(clk), .rst(rst), .in(term), .sum(y));

endmodule
