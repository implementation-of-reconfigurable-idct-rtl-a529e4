// mstd_idct1d: reconfigurable 1-D inverse DCT for MPEG-2, MPEG-4 ASP,
// H.264/AVC and VC-1. One row (or column) of eight coefficients enters per
// cycle, and the row's transform is chosen per row by mode: the 8-point
// IDCTs of MPEG-2/4, H.264 and VC-1, the 4-point IDCTs of VC-1 and H.264, and
// the H.264 4-point Hadamard transform.
//
// How it works: every 8-point IDCT of these standards splits into a 4-point
// even part T4 (inputs x0, x2, x4, x6; constants a, f, g), a 4-point odd part
// V4 (inputs x1, x3, x5, x7; constants b, c, d, e) and an output butterfly.
// The products are formed without multipliers by eight subunits, one per
// input: a(x) for x0 and x4, fg(x) for x2 and x6, bcde(x) for the four odd
// inputs. Each subunit builds the constants of all standards from shifts
// and a few adders whose terms (factor sharing) and adders (adder sharing)
// are shared between standards. The adder tree then forms T4*Xe and V4*Xo
// and the butterfly. A 4-point row uses only the even half: the input
// permutation steers its four coefficients to the even positions, and the
// butterfly is bypassed.
// The decomposition, the subunits and the adder tree follow the source
// architecture. The pipeline depth, the word widths, the valid signalling
// and the 8-bit fixed-point MPEG constants are this design's choices.
//
// Interface: x[0..7] are signed IN_W-bit coefficients; a 4-point row uses
// x[0..3] and x[4..7] are ignored. Results are not normalised: y carries the
// full-precision matrix product (VC-1: shift right by 3 / 7 with rounding
// afterwards, H.264 8-point: divide by 8 relative to the standard's
// butterfly, MPEG: the constants carry 2^8). A 4-point row's results are on
// y[0..3] and y[4..7] are 0.
// Timing: products are registered once, then three adder levels; out_valid
// follows in_valid by LATENCY = 4 cycles, one row per cycle, no stalls.
module mstd_idct1d
  import idct_pkg::*;
#(
  parameter int IN_W = 16,
  localparam int PW = IN_W + PROD_GROW,
  localparam int OW = IN_W + OUT_GROW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  idct_mode_e             mode,
  input  logic signed [IN_W-1:0] x [8],
  output logic                   out_valid,
  output idct_mode_e             out_mode,
  output logic signed [OW-1:0]   y [8]
);

  // Input permutation: even and odd operands of the row
  logic signed [IN_W-1:0] xe [4];   // feeds positions x0, x2, x4, x6
  logic signed [IN_W-1:0] xo [4];   // feeds positions x1, x3, x5, x7

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (is_4pt(mode)) begin
        xe[i] = x[i];
        xo[i] = '0;
      end else begin
        xe[i] = x[2 * i];
        xo[i] = x[2 * i + 1];
      end
    end
  end

  // Subunits
  logic signed [PW-1:0] ax0_c, ax4_c, fx2_c, gx2_c, fx6_c, gx6_c;
  logic signed [PW-1:0] odd_c [4][4];

  a_unit  #(.IN_W(IN_W)) u_a0  (.mode(mode), .x(xe[0]), .ax(ax0_c));
  a_unit  #(.IN_W(IN_W)) u_a4  (.mode(mode), .x(xe[2]), .ax(ax4_c));
  fg_unit #(.IN_W(IN_W)) u_fg2 (.mode(mode), .x(xe[1]), .fx(fx2_c), .gx(gx2_c));
  fg_unit #(.IN_W(IN_W)) u_fg6 (.mode(mode), .x(xe[3]), .fx(fx6_c), .gx(gx6_c));

  for (genvar i = 0; i < 4; i++) begin : g_bcde
    bcde_unit #(.IN_W(IN_W)) u_bcde (
      .mode(mode), .x(xo[i]),
      .bx(odd_c[i][0]), .cx(odd_c[i][1]), .dx(odd_c[i][2]), .ex(odd_c[i][3])
    );
  end

  // Product register
  logic                 p_valid;
  idct_mode_e           p_mode;
  logic signed [PW-1:0] ax0_r, ax4_r, fx2_r, gx2_r, fx6_r, gx6_r;
  logic signed [PW-1:0] odd_r [4][4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_valid <= 1'b0;
    else        p_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    p_mode <= mode;
    ax0_r  <= ax0_c;
    ax4_r  <= ax4_c;
    fx2_r  <= fx2_c;
    gx2_r  <= gx2_c;
    fx6_r  <= fx6_c;
    gx6_r  <= gx6_c;
    odd_r  <= odd_c;
  end

  adder_tree #(.IN_W(IN_W)) u_tree (
    .clk(clk), .rst_n(rst_n),
    .in_valid(p_valid), .mode(p_mode),
    .ax0(ax0_r), .ax4(ax4_r), .fx2(fx2_r), .gx2(gx2_r), .fx6(fx6_r), .gx6(gx6_r),
    .odd_p(odd_r),
    .out_valid(out_valid), .out_mode(out_mode), .y(y)
  );

  // A row must carry one of the defined transforms.
  a_mode_legal: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (mode inside {MODE_MPEG8, MODE_AVC8, MODE_VC1_8,
                               MODE_VC1_4, MODE_AVC4, MODE_HAD4}));

endmodule
