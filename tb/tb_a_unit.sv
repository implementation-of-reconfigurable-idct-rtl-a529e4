// tb_a_unit: checks a*x of the a(x) subunit for every mode against the
// reference constants, on edge values and random inputs of full width.
module tb_a_unit;
  import idct_pkg::*;
  import idct_ref_pkg::*;

  localparam int IN_W = 16;
  localparam int PW = IN_W + PROD_GROW;

  idct_mode_e             mode;
  logic signed [IN_W-1:0] x;
  logic signed [PW-1:0]   ax;
  int checks = 0, failures = 0;

  a_unit dut (.mode(mode), .x(x), .ax(ax));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(idct_mode_e m, longint v);
    longint exp;
    mode = m;
    x = IN_W'(v);
    #1;
    exp = konst(m, "a") * longint'(x);
    checks++;
    if (longint'(ax) != exp) begin
      failures++;
      $display("FAIL mode=%s x=%0d ax=%0d expected %0d", m.name(), x, ax, exp);
    end
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
