// tb_fg_unit: checks f*x and g*x of the fg(x) subunit for every mode against
// the reference constants; the H.264 4-point g = 1/2 is checked as an
// arithmetic shift (floor of x/2), as the standard defines it.
module tb_fg_unit;
  import idct_pkg::*;
  import idct_ref_pkg::*;

  localparam int IN_W = 16;
  localparam int PW = IN_W + PROD_GROW;

  idct_mode_e             mode;
  logic signed [IN_W-1:0] x;
  logic signed [PW-1:0]   fx, gx;
  int checks = 0, failures = 0;

  fg_unit dut (.mode(mode), .x(x), .fx(fx), .gx(gx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(idct_mode_e m, longint v);
    longint ef, eg;
    mode = m;
    x = IN_W'(v);
    #1;
    ef = konst(m, "f") * longint'(x);
    eg = (m == MODE_AVC4) ? (longint'(x) >>> 1) : konst(m, "g") * longint'(x);
    checks += 2;
    if (longint'(fx) != ef) begin
      failures++;
      $display("FAIL f mode=%s x=%0d fx=%0d expected %0d", m.name(), x, fx, ef);
    end
    if (longint'(gx) != eg) begin
      failures++;
      $display("FAIL g mode=%s x=%0d gx=%0d expected %0d", m.name(), x, gx, eg);
    end
  endtask

  initial begin
    longint edges [7] = '{0, 1, -1, 32767, -32768, -7, 1234};
    for (int i = 0; i < 6; i++) begin
      foreach (edges[e]) check(mode_of(i), edges[e]);
      repeat (500) check(mode_of(i), longint'($signed(16'($urandom))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
