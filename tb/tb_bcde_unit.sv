// tb_bcde_unit: checks b*x, c*x, d*x and e*x of the bcde(x) subunit for the
// three 8-point standards against the reference constants, and that the
// outputs are 0 in the 4-point modes.
module tb_bcde_unit;
  import idct_pkg::*;
  import idct_ref_pkg::*;

  localparam int IN_W = 16;
  localparam int PW = IN_W + PROD_GROW;

  idct_mode_e             mode;
  logic signed [IN_W-1:0] x;
  logic signed [PW-1:0]   bx, cx, dx, ex;
  int checks = 0, failures = 0;

  bcde_unit dut (.mode(mode), .x(x), .bx(bx), .cx(cx), .dx(dx), .ex(ex));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(string nm, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s mode=%s x=%0d got %0d expected %0d", nm, mode.name(), x, got, exp);
    end
  endtask

  task automatic check(idct_mode_e m, longint v);
    mode = m;
    x = IN_W'(v);
    #1;
    one("b", longint'(bx), konst(m, "b") * longint'(x));
    one("c", longint'(cx), konst(m, "c") * longint'(x));
    one("d", longint'(dx), konst(m, "d") * longint'(x));
    one("e", longint'(ex), konst(m, "e") * longint'(x));
  endtask

  initial begin
    longint edges [6] = '{0, 1, -1, 32767, -32768, 1234};
    for (int i = 0; i < 6; i++) begin
      foreach (edges[e]) check(mode_of(i), edges[e]);
      repeat (500) check(mode_of(i), longint'($signed(16'($urandom))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
