// adder_tree: the accumulation stage of the multistandard IDCT. It sums the
// products of the eight subunits into the even half T4*Xe and the odd half
// V4*Xo of the transform, then applies the output butterfly.
//
// How it works: three registered levels.
//   level 1  pairwise sums of the products. The even half is itself a
//            butterfly: (a*x0 +/- a*x4) and (f*x2 + g*x6, g*x2 - f*x6).
//            The odd half adds the products two by two.
//   level 2  even outputs E0..E3 and odd outputs O0..O3:
//              E0 = a x0 + f x2 + a x4 + g x6     O0 = b x1 + c x3 + d x5 + e x7
//              E1 = a x0 + g x2 - a x4 - f x6     O1 = c x1 - e x3 - b x5 - d x7
//              E2 = a x0 - g x2 - a x4 + f x6     O2 = d x1 - b x3 + e x5 + c x7
//              E3 = a x0 - f x2 + a x4 - g x6     O3 = e x1 - d x3 + c x5 - b x7
//   level 3  butterfly: y[n] = En + On and y[7-n] = En - On for an 8-point
//            row. A 4-point row bypasses it: y[n] = En, y[4..7] = 0.
// The structure (tree of adders that also holds the butterfly) follows the
// source architecture; splitting it into exactly three pipeline levels is
// this design's own choice.
//
// Interface: in_valid/mode qualify the products of one row; three cycles
// later out_valid is high for one cycle with the results y[0..7] and the
// row's mode. A new row may enter every cycle; there is no back-pressure.
// ax0 etc. are named after the 8-point input they come from; odd_p[i][j]
// holds input x(2i+1) times constant j (0 = b, 1 = c, 2 = d, 3 = e).
module adder_tree
  import idct_pkg::*;
#(
  parameter int IN_W = 16,
  localparam int PW = IN_W + PROD_GROW,
  localparam int OW = IN_W + OUT_GROW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  idct_mode_e            mode,
  input  logic signed [PW-1:0]  ax0,
  input  logic signed [PW-1:0]  ax4,
  input  logic signed [PW-1:0]  fx2,
  input  logic signed [PW-1:0]  gx2,
  input  logic signed [PW-1:0]  fx6,
  input  logic signed [PW-1:0]  gx6,
  input  logic signed [PW-1:0]  odd_p [4][4],
  output logic                  out_valid,
  output idct_mode_e            out_mode,
  output logic signed [OW-1:0]  y [8]
);

  localparam int B = 0, C = 1, D = 2, E = 3;

  // Pipeline control
  logic       v1, v2;
  idct_mode_e m1, m2;

  // Level 1 registers
  logic signed [OW-1:0] ev1 [4];
  logic signed [OW-1:0] od1 [8];
  // Level 2 registers
  logic signed [OW-1:0] e2 [4];
  logic signed [OW-1:0] o2 [4];

  function automatic logic signed [OW-1:0] ext(input logic signed [PW-1:0] v);
    return OW'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
  end

  // Level 1
  always_ff @(posedge clk) begin
    m1     <= mode;
    ev1[0] <= ext(ax0) + ext(ax4);
    ev1[1] <= ext(ax0) - ext(ax4);
    ev1[2] <= ext(fx2) + ext(gx6);
    ev1[3] <= ext(gx2) - ext(fx6);
    od1[0] <= ext(odd_p[0][B]) + ext(odd_p[1][C]);
    od1[1] <= ext(odd_p[2][D]) + ext(odd_p[3][E]);
    od1[2] <= ext(odd_p[0][C]) - ext(odd_p[1][E]);
    od1[3] <= ext(odd_p[2][B]) + ext(odd_p[3][D]);
    od1[4] <= ext(odd_p[0][D]) - ext(odd_p[1][B]);
    od1[5] <= ext(odd_p[2][E]) + ext(odd_p[3][C]);
    od1[6] <= ext(odd_p[0][E]) - ext(odd_p[1][D]);
    od1[7] <= ext(odd_p[2][C]) - ext(odd_p[3][B]);
  end

  // Level 2
  always_ff @(posedge clk) begin
    m2    <= m1;
    e2[0] <= ev1[0] + ev1[2];
    e2[1] <= ev1[1] + ev1[3];
    e2[2] <= ev1[1] - ev1[3];
    e2[3] <= ev1[0] - ev1[2];
    o2[0] <= od1[0] + od1[1];
    o2[1] <= od1[2] - od1[3];
    o2[2] <= od1[4] + od1[5];
    o2[3] <= od1[6] + od1[7];
  end

  // Level 3: butterfly, bypassed for 4-point rows
  always_ff @(posedge clk) begin
    out_mode <= m2;
    for (int n = 0; n < 4; n++) begin
      if (is_4pt(m2)) begin
        y[n]     <= e2[n];
        y[7 - n] <= '0;
      end else begin
        y[n]     <= e2[n] + o2[n];
        y[7 - n] <= e2[n] - o2[n];
      end
    end
  end

endmodule
