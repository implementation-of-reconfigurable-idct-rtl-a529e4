// a_unit: subunit a(x) of the multistandard IDCT. It forms a*x for one of the
// two inputs that meet the constant a (x0 and x4 of an 8-point row, y0 and y2
// of a 4-point row), without a multiplier.
//
// How it works: the products of every standard are built from shifts and
// three adders. Factor sharing: the term 3x is formed once and reused by
// MPEG (181 = 3*64 - 3*4 + 1) and VC-1 8-point (12 = 3*4). Adder sharing:
// the last adder adds x to either 180x (MPEG) or 16x (VC-1 4-point, 17x); a
// multiplexer in front of it picks the operand by mode. H.264 8-point (8x) and
// the H.264 4-point / Hadamard cases (1x) are plain shifts.
// The constants per standard follow the transform matrices of the standards;
// the exact shift-add decomposition is this design's own.
//
// Interface: purely combinational. mode selects the standard, x is a signed
// IN_W-bit coefficient, ax is the signed product, IN_W+9 bits wide. An
// unused mode code gives 0.
module a_unit
  import idct_pkg::*;
#(
  parameter int IN_W = 16,
  localparam int PW = IN_W + PROD_GROW
) (
  input  idct_mode_e             mode,
  input  logic signed [IN_W-1:0] x,
  output logic signed [PW-1:0]   ax
);

  logic signed [PW-1:0] xs, x3, x180, share_a, share_sum;

  always_comb begin
    xs   = PW'(x);
    x3   = xs + (xs <<< 1);                 // adder 1: 3x (shared factor)
    x180 = (x3 <<< 6) - (x3 <<< 2);         // adder 2: 180x
    share_a   = (mode == MODE_MPEG8) ? x180 : (xs <<< 4);
    share_sum = share_a + xs;               // adder 3: 181x or 17x
    unique case (mode)
      MODE_MPEG8, MODE_VC1_4: ax = share_sum;
      MODE_AVC8:              ax = xs <<< 3;
      MODE_VC1_8:             ax = x3 <<< 2;
      MODE_AVC4, MODE_HAD4:   ax = xs;
      default:                ax = '0;
    endcase
  end

endmodule
