// tb_mstd_idct1d: end-to-end test of the multistandard 1-D IDCT at its
// default parameters.
//
// Part 1 streams random rows in every mode, switching the mode from row to
// row, with and without idle cycles between rows and with full-scale
// inputs. Every output row is compared with the reference transform, and
// must appear exactly 4 cycles after its row was taken.
// Part 2 runs the 2-D block transforms of the standards the way a decoder
// uses a 1-D unit: all rows of a block, an intermediate scaling, then all
// columns. Blocks: MPEG 8x8, H.264 8x8 and 4x4 and 4x4 Hadamard, VC-1 8x8,
// 8x4, 4x8 and 4x4 (VC-1 scales rows by (v + 4) >> 3, as its standard does;
// the others by a right shift chosen here to keep the column input within
// 16 bits). The final block is compared with a 2-D reference built from
// the same reference rows.
// At the end it counts how often each mechanism occurred (each mode, mode
// switch between consecutive rows, back-to-back rows, idle gaps, the 4-point
// butterfly bypass, full-scale rows, each 2-D block type) and fails any that
// never did.
module tb_mstd_idct1d;
  import idct_pkg::*;
  import idct_ref_pkg::*;

  localparam int IN_W = 16;
  localparam int OW = IN_W + OUT_GROW;
  localparam int LAT = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  idct_mode_e mode = MODE_MPEG8;
  logic signed [IN_W-1:0] x [8];
  logic out_valid;
  idct_mode_e out_mode;
  logic signed [OW-1:0] y [8];

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct {
    idct_mode_e m;
    longint     y [8];
  } exp_t;
  exp_t   q [$];
  int     stamp [$];
  exp_t   outq [$];   // rows as they left the design

  // Mechanism counters
  int n_mode [6];
  int n_switch = 0, n_b2b = 0, n_gap = 0, n_bypass = 0, n_bfly = 0, n_full = 0;
  int n_blk [8];
  string blk_name [8] = '{"MPEG 8x8", "H.264 8x8", "VC-1 8x8", "VC-1 8x4",
                          "VC-1 4x8", "VC-1 4x4", "H.264 4x4", "H.264 Hadamard 4x4"};

  // 2-D block types: rows x columns, row-pass mode, column-pass mode, and
  // the intermediate scaling (v + add) >>> shift. "8x4" is 8 wide, 4 tall.
  int         cfg_rows  [8] = '{8, 8, 8, 4, 8, 4, 4, 4};
  int         cfg_cols  [8] = '{8, 8, 8, 8, 4, 4, 4, 4};
  idct_mode_e cfg_rm    [8] = '{MODE_MPEG8, MODE_AVC8, MODE_VC1_8, MODE_VC1_8,
                                MODE_VC1_4, MODE_VC1_4, MODE_AVC4, MODE_HAD4};
  idct_mode_e cfg_cm    [8] = '{MODE_MPEG8, MODE_AVC8, MODE_VC1_8, MODE_VC1_4,
                                MODE_VC1_8, MODE_VC1_4, MODE_AVC4, MODE_HAD4};
  int         cfg_shift [8] = '{8, 3, 3, 3, 3, 3, 0, 0};
  longint     cfg_add   [8] = '{128, 4, 4, 4, 4, 4, 0, 0};

  mstd_idct1d dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input monitor, mechanism counters and output checker
  logic       prev_valid = 0;
  idct_mode_e prev_mode;
  logic       seen_row = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      stamp.push_back(cycle);
      n_mode[int'(mode)]++;
      if (is_4pt(mode)) n_bypass++; else n_bfly++;
      if (seen_row && prev_mode != mode) n_switch++;
      if (prev_valid) n_b2b++;
      else if (seen_row) n_gap++;
      prev_mode = mode;
      seen_row = 1;
    end
    prev_valid = rst_n && in_valid;
    if (rst_n && out_valid) begin
      exp_t e;
      int due;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
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
        for (int n = 0; n < 8; n++) e.y[n] = longint'(y[n]);
        outq.push_back(e);
      end
    end
    cycle++;
  end

  function automatic longint rnd(int bits);
    return longint'($signed(32'($urandom))) >>> (32 - bits);
  endfunction

  // Present one row; the caller advances the clock.
  task automatic drive_row(idct_mode_e m, input longint xr [8]);
    exp_t e;
    ref_row(m, xr, e.y);
    e.m = m;
    q.push_back(e);
    for (int k = 0; k < 8; k++) x[k] <= IN_W'(xr[k]);
    mode <= m;
    in_valid <= 1'b1;
  endtask

  task automatic idle(int n);
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  // Part 1: random stream
  task automatic random_stream(int rows);
    longint xr [8];
    idct_mode_e m;
    for (int r = 0; r < rows; r++) begin
      m = mode_of($urandom % 6);
      for (int k = 0; k < 8; k++) xr[k] = rnd(IN_W);
      if (r % 17 == 0) begin
        for (int k = 0; k < 8; k++) xr[k] = ($urandom % 2 == 1) ? 32767 : -32768;
        n_full++;
      end
      if (is_4pt(m)) for (int k = 4; k < 8; k++) xr[k] = rnd(IN_W);  // ignored lanes
      drive_row(m, xr);
      @(posedge clk);
      if ($urandom % 5 == 0) idle(1 + $urandom % 3);
    end
    idle(LAT + 2);
  endtask

  // Part 2: one 2-D block of rows_n x cols_n through row pass and column pass
  task automatic block_2d(int id, int rows_n, int cols_n, idct_mode_e rm, idct_mode_e cm,
                          int shift, longint rnd_add);
    longint blk [8][8], mid [8][8], res [8][8], xr [8], yr [8];
    exp_t e;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) blk[r][c] = (r < rows_n && c < cols_n) ? rnd(9) : 0;
    // Row pass
    outq.delete();
    for (int r = 0; r < rows_n; r++) begin
      for (int c = 0; c < 8; c++) xr[c] = blk[r][c];
      drive_row(rm, xr);
      @(posedge clk);
    end
    idle(LAT + 2);
    if (outq.size() != rows_n) begin
      failures++;
      $display("FAIL %s: %0d row results", blk_name[id], outq.size());
      return;
    end
    for (int r = 0; r < rows_n; r++) begin
      e = outq.pop_front();
      for (int c = 0; c < 8; c++) mid[r][c] = (e.y[c] + rnd_add) >>> shift;
    end
    // Column pass
    for (int c = 0; c < cols_n; c++) begin
      for (int r = 0; r < 8; r++) xr[r] = mid[r][c];
      drive_row(cm, xr);
      @(posedge clk);
    end
    idle(LAT + 2);
    if (outq.size() != cols_n) begin
      failures++;
      $display("FAIL %s: %0d column results", blk_name[id], outq.size());
      return;
    end
    for (int c = 0; c < cols_n; c++) begin
      e = outq.pop_front();
      for (int r = 0; r < rows_n; r++) res[r][c] = e.y[r];
    end
    // 2-D reference: rows, the same scaling, then columns
    for (int r = 0; r < rows_n; r++) begin
      for (int c = 0; c < 8; c++) xr[c] = blk[r][c];
      ref_row(rm, xr, yr);
      for (int c = 0; c < 8; c++) mid[r][c] = (yr[c] + rnd_add) >>> shift;
    end
    for (int c = 0; c < cols_n; c++) begin
      for (int r = 0; r < 8; r++) xr[r] = mid[r][c];
      ref_row(cm, xr, yr);
      for (int r = 0; r < rows_n; r++) begin
        checks++;
        if (res[r][c] != yr[r]) begin
          failures++;
          $display("FAIL %s [%0d][%0d] = %0d expected %0d", blk_name[id], r, c, res[r][c], yr[r]);
        end
      end
    end
    n_blk[id]++;
  endtask

  initial begin
    for (int k = 0; k < 8; k++) x[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    random_stream(3000);

    for (int rep = 0; rep < 20; rep++)
      for (int id = 0; id < 8; id++)
        block_2d(id, cfg_rows[id], cfg_cols[id], cfg_rm[id], cfg_cm[id], cfg_shift[id],
                 cfg_add[id]);

    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d rows never came out", q.size());
    end

    for (int i = 0; i < 6; i++) begin
      $display("rows in mode %s: %0d", mode_of(i).name(), n_mode[i]);
      if (n_mode[i] == 0) failures++;
    end
    $display("mode switches %0d, back-to-back rows %0d, idle gaps %0d", n_switch, n_b2b, n_gap);
    $display("butterfly rows %0d, bypassed 4-point rows %0d, full-scale rows %0d",
             n_bfly, n_bypass, n_full);
    if (n_switch == 0 || n_b2b == 0 || n_gap == 0 || n_bypass == 0 || n_bfly == 0 || n_full == 0)
      failures++;
    for (int i = 0; i < 8; i++) begin
      $display("2-D blocks %s: %0d", blk_name[i], n_blk[i]);
      if (n_blk[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
