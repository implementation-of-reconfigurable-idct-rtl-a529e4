// bcde_unit: subunit bcde(x) of the multistandard IDCT. It forms b*x, c*x,
// d*x and e*x for one odd input (x1, x3, x5 or x7) of an 8-point row, for
// MPEG-2/4, H.264/AVC and VC-1, without a multiplier.
//
// How it works: seven adders serve the three 8-point standards.
//   adder 1, 2   3x and 5x, shared by all outputs (factor sharing)
//   adder 3      MPEG b = 256 - 5
//   adder 4      MPEG 7x = 8 - 1, or VC-1 c = 16 - 1 (shared adder)
//   adder 5      MPEG 71x = 64 + 7, or VC-1 d = 8 + 1 (shared adder)
//   adder 6      MPEG c = 213 = 3 * 71, while MPEG d = 142 = 2 * 71 is a shift
//   adder 7      MPEG e = 50 = 5 * 8 + 5 * 2
// H.264 b, c, d, e (12, 10, 6, 3) are shifts of 3x and 5x, VC-1 b and e
// (16, 4) shifts of x. Which adders are shared, and how, is this design's
// own choice; the constants are those of the standards' matrices.
//
// Interface: purely combinational, signed IN_W+9-bit products. The 4-point
// transforms do not use the odd inputs, and in those modes (and for unused
// mode codes) all four outputs are 0.
module bcde_unit
  import idct_pkg::*;
#(
  parameter int IN_W = 16,
  localparam int PW = IN_W + PROD_GROW
) (
  input  idct_mode_e             mode,
  input  logic signed [IN_W-1:0] x,
  output logic signed [PW-1:0]   bx,
  output logic signed [PW-1:0]   cx,
  output logic signed [PW-1:0]   dx,
  output logic signed [PW-1:0]   ex
);

  logic signed [PW-1:0] xs, x3, x5, b251, s1, s2, c213, e50;
  logic                 mpeg;

  always_comb begin
    mpeg = (mode == MODE_MPEG8);
    xs   = PW'(x);
    x3   = xs + (xs <<< 1);                         // adder 1
    x5   = xs + (xs <<< 2);                         // adder 2
    b251 = (xs <<< 8) - x5;                         // adder 3
    s1   = (mpeg ? (xs <<< 3) : (xs <<< 4)) - xs;   // adder 4: 7x or 15x
    s2   = mpeg ? ((xs <<< 6) + s1) : ((xs <<< 3) + xs);  // adder 5: 71x or 9x
    c213 = s2 + (s2 <<< 1);                         // adder 6
    e50  = (x5 <<< 3) + (x5 <<< 1);                 // adder 7

    unique case (mode)
      MODE_MPEG8: begin bx = b251;     cx = c213;     dx = s2 <<< 1; ex = e50;     end
      MODE_AVC8:  begin bx = x3 <<< 2; cx = x5 <<< 1; dx = x3 <<< 1; ex = x3;      end
      MODE_VC1_8: begin bx = xs <<< 4; cx = s1;       dx = s2;       ex = xs <<< 2; end
      default:    begin bx = '0;       cx = '0;       dx = '0;       ex = '0;      end
    endcase
  end

endmodule
