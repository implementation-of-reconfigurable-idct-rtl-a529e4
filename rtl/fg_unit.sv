// fg_unit: subunit fg(x) of the multistandard IDCT. It forms f*x and g*x for
// one of the two inputs that meet the constants f and g (x2 and x6 of an
// 8-point row, y1 and y3 of a 4-point row), without a multiplier.
//
// How it works: five adders serve all standards. The factors 3x and 5x are
// formed once (factor sharing). g uses one adder, needed only by MPEG
// (98 = 3*32 + 2); every other g is a shift of x, 3x or 5x, and the H.264
// 4-point g = 1/2 is an arithmetic right shift by one, as in the standard.
// f uses two adders in series: MPEG 237 = 256 - 16 - 3, and the first of the
// two is shared with VC-1 4-point 22 = 5*4 + 2 through an operand
// multiplexer (adder sharing).
// The constants follow the standards' matrices; the decomposition is this
// design's own.
//
// Interface: purely combinational. fx and gx are signed, IN_W+9 bits. An
// unused mode code gives 0 on both outputs.
module fg_unit
  import idct_pkg::*;
#(
  parameter int IN_W = 16,
  localparam int PW = IN_W + PROD_GROW
) (
  input  idct_mode_e             mode,
  input  logic signed [IN_W-1:0] x,
  output logic signed [PW-1:0]   fx,
  output logic signed [PW-1:0]   gx
);

  logic signed [PW-1:0] xs, x3, x5, g98, f_a, f_b, f_s1, f237;
  logic                 mpeg;

  always_comb begin
    mpeg = (mode == MODE_MPEG8);
    xs   = PW'(x);
    x3   = xs + (xs <<< 1);                 // adder 1: 3x
    x5   = xs + (xs <<< 2);                 // adder 2: 5x
    g98  = (x3 <<< 5) + (xs <<< 1);         // adder 3: 98x
    // adder 4, shared: 240x for MPEG, 22x for VC-1 4-point
    f_a  = mpeg ? (xs <<< 8) : (x5 <<< 2);
    f_b  = mpeg ? -(xs <<< 4) : (xs <<< 1);
    f_s1 = f_a + f_b;
    f237 = f_s1 - x3;                       // adder 5: 237x

    unique case (mode)
      MODE_MPEG8: begin fx = f237;       gx = g98;        end
      MODE_AVC8:  begin fx = xs <<< 3;   gx = xs <<< 2;   end
      MODE_VC1_8: begin fx = xs <<< 4;   gx = x3 <<< 1;   end
      MODE_VC1_4: begin fx = f_s1;       gx = x5 <<< 1;   end
      MODE_AVC4:  begin fx = xs;         gx = xs >>> 1;   end
      MODE_HAD4:  begin fx = xs;         gx = xs;         end
      default:    begin fx = '0;         gx = '0;         end
    endcase
  end

endmodule
