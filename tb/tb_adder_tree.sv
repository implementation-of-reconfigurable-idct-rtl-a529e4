// tb_adder_tree: drives the adder tree with the products of random rows
// (worked out here from the reference constants), in every mode, back to
// back and with gaps, and checks each output row against the reference
// transform and that it appears exactly 3 cycles after its products. In the
// 4-point modes the odd products are filled with noise, which the butterfly
// bypass must ignore.
module tb_adder_tree;
  import idct_pkg::*;
  import idct_ref_pkg::*;

  localparam int IN_W = 16;
  localparam int PW = IN_W + PROD_GROW;
  localparam int OW = IN_W + OUT_GROW;
  localparam int LAT = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  idct_mode_e mode = MODE_MPEG8;
  logic signed [PW-1:0] ax0, ax4, fx2, gx2, fx6, gx6;
  logic signed [PW-1:0] odd_p [4][4];
  logic out_valid;
  idct_mode_e out_mode;
  logic signed [OW-1:0] y [8];

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    idct_mode_e m;
    longint     y [8];
  } exp_t;
  exp_t q [$];
  int   stamp [$];   // cycle at which each row was sampled

  adder_tree dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd(int bits);
    return longint'($signed(32'($urandom))) >>> (32 - bits);
  endfunction

  task automatic drive_row(idct_mode_e m);
    longint x [8];
    exp_t e;
    logic four = is_4pt(m);
    for (int k = 0; k < 8; k++) x[k] = (four && k > 3) ? 0 : rnd(IN_W);
    ref_row(m, x, e.y);
    e.m = m;
    q.push_back(e);
    if (four) begin
      ax0 <= PW'(konst(m, "a") * x[0]);
      ax4 <= PW'(konst(m, "a") * x[2]);
      fx2 <= PW'(konst(m, "f") * x[1]);
      fx6 <= PW'(konst(m, "f") * x[3]);
      gx2 <= PW'((m == MODE_AVC4) ? (x[1] >>> 1) : konst(m, "g") * x[1]);
      gx6 <= PW'((m == MODE_AVC4) ? (x[3] >>> 1) : konst(m, "g") * x[3]);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) odd_p[i][j] <= PW'(rnd(PW));
    end else begin
      ax0 <= PW'(konst(m, "a") * x[0]);
      ax4 <= PW'(konst(m, "a") * x[4]);
      fx2 <= PW'(konst(m, "f") * x[2]);
      gx2 <= PW'(konst(m, "g") * x[2]);
      fx6 <= PW'(konst(m, "f") * x[6]);
      gx6 <= PW'(konst(m, "g") * x[6]);
      for (int i = 0; i < 4; i++) begin
        odd_p[i][0] <= PW'(konst(m, "b") * x[2 * i + 1]);
        odd_p[i][1] <= PW'(konst(m, "c") * x[2 * i + 1]);
        odd_p[i][2] <= PW'(konst(m, "d") * x[2 * i + 1]);
        odd_p[i][3] <= PW'(konst(m, "e") * x[2 * i + 1]);
      end
    end
    mode <= m;
    in_valid <= 1'b1;
  endtask

  // Input monitor and output checker, one clock count for both
  always @(posedge clk) begin
    if (rst_n && in_valid) stamp.push_back(cycle);
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        int due;
        e = q.pop_front();
        due = stamp.pop_front() + LAT;
        if (cycle != due) begin
          failures++;
          $display("FAIL latency: output at cycle %0d, due %0d", cycle, due);
        end
        if (out_mode != e.m) begin
          failures++;
          $display("FAIL mode %s expected %s", out_mode.name(), e.m.name());
        end
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (longint'(y[n]) != e.y[n]) begin
            failures++;
            $display("FAIL mode=%s y[%0d]=%0d expected %0d", e.m.name(), n, y[n], e.y[n]);
          end
        end
      end
    end
    cycle++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < 600; r++) begin
      drive_row(mode_of($urandom % 6));
      @(posedge clk);
      if ($urandom % 4 == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d rows never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
