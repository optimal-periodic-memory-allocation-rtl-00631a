// Testbench for stereo_processor in the smaller configuration of the
// multi-resolution example: 3 x 3 windows, sampling periods 3..1, 11 memory
// modules with period vectors A = (11,0), B = (3,1), disparities 0..31, on a
// 96 x 32 image.
// Phase 1: the candidate image is the reference image shifted right by 9
// pixels (a multiple of the coarsest period), so every search must return
// disparity 9 with SAD 0.
// Phase 2: an unrelated random candidate image; every search is compared
// with a behavioural model of the coarse-to-fine search written here from
// its definition (same candidate ranges, earliest minimum wins).
// Both phases check the cycle count: sum over the 3 levels of
// (candidates + 4), and that each search runs exactly 3 levels.
module tb_stereo_q3;
  import pma_pkg::*;
  localparam int W = 96, H = 32, DMAX = 31, SHIFT = 9, Q = 3, SPM = 3;
  logic clk = 0, rst_n;
  logic ld_en, ld_sel, start, ready, done, level_start, cand_issue;
  logic [6:0] ld_x, ref_x;
  logic [4:0] ld_y, ref_y;
  pixel_t ld_data;
  logic [4:0] disparity;
  logic [11:0] best_sad;
  logic [1:0] cur_sp;
  pixel_t limg [W][H];
  pixel_t rimg [W][H];
  int checks = 0, failures = 0;
  int levels;

  stereo_processor #(.Q(Q), .SP_MAX(SPM), .AX(11), .BX(3), .BY(1), .IMG_W(W), .IMG_H(H), .D_MAX(DMAX)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (level_start) levels++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int absdiff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  // coarse-to-fine reference search
  task automatic model(input int rx, input int ry, output int d_res, output int sad_res, output int cyc);
    int sp, lo, hi, step, bestd, bests, n, s;
    sp = SPM; lo = 0; hi = DMAX; step = SPM; cyc = 0;
    forever begin
      n = 0; bestd = 0; bests = 0;
      for (int d = lo; d <= hi; d += step) begin
        s = 0;
        for (int r = 0; r < Q; r++)
          for (int c = 0; c < Q; c++)
            s += absdiff(limg[rx + sp*c][ry + sp*r], rimg[rx + d + sp*c][ry + sp*r]);
        if (n == 0 || s < bests) begin bests = s; bestd = d; end
        n++;
      end
      cyc += n + 4;
      if (sp == 1) break;
      sp--;
      lo = (bestd > sp) ? bestd - sp : 0;
      hi = (bestd + sp > DMAX) ? DMAX : bestd + sp;
      step = 1;
    end
    d_res = bestd; sad_res = bests;
  endtask

  task automatic load(input bit sel);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        ld_en = 1; ld_sel = sel; ld_x = 7'(x); ld_y = 5'(y);
        ld_data = sel ? rimg[x][y] : limg[x][y];
      end
    @(negedge clk);
    ld_en = 0;
  endtask

  task automatic search(input int rx, input int ry, input bit exact);
    int want_d, want_s, want_c, cyc;
    model(rx, ry, want_d, want_s, want_c);
    @(negedge clk);
    check(ready, "ready before start");
    start = 1; ref_x = 7'(rx); ref_y = 5'(ry); levels = 0;
    @(posedge clk);
    #1 start = 0;
    cyc = 0;
    while (!done && cyc < 2000) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(int'(disparity) == want_d, $sformatf("(%0d,%0d) disparity %0d want %0d", rx, ry, disparity, want_d));
    check(int'(best_sad) == want_s, $sformatf("(%0d,%0d) sad %0d want %0d", rx, ry, best_sad, want_s));
    check(cyc == want_c, $sformatf("(%0d,%0d) cycles %0d want %0d", rx, ry, cyc, want_c));
    check(levels == SPM, $sformatf("levels %0d", levels));
    if (exact) begin
      check(int'(disparity) == SHIFT, "shifted image: disparity");
      check(best_sad == 0, "shifted image: SAD 0");
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; ld_en = 0; ld_sel = 0; ld_x = 0; ld_y = 0; ld_data = 0;
    start = 0; ref_x = 0; ref_y = 0; levels = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) limg[x][y] = pixel_t'($urandom);
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) rimg[x][y] = (x >= SHIFT) ? limg[x-SHIFT][y] : pixel_t'($urandom);
    load(0);
    load(1);
    for (int i = 0; i < 12; i++) search($urandom_range(0, W - 1 - DMAX - (Q-1)*SPM), $urandom_range(0, H - 1 - (Q-1)*SPM), 1);
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) rimg[x][y] = pixel_t'($urandom);
    load(1);
    for (int i = 0; i < 30; i++) search($urandom_range(0, W - 1 - DMAX - (Q-1)*SPM), $urandom_range(0, H - 1 - (Q-1)*SPM), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
