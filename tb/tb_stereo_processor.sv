// Testbench for stereo_processor on a 128 x 48 image (Q = 4, sampling
// periods 8..1, disparities 0..63, 17 modules).
// Phase 1: the candidate image is the reference image shifted right by 16
// pixels, so every search must return disparity 16 with SAD 0.
// Phase 2: an unrelated random candidate image; every search is compared
// with a behavioural model of the coarse-to-fine search written here from
// its definition (same candidate ranges, earliest minimum wins).
// Both phases check the cycle count: sum over the 8 levels of
// (candidates + 4), and that each search runs exactly 8 levels.
module tb_stereo_processor;
  import pma_pkg::*;
  localparam int W = 128, H = 48, DMAX = 63, SHIFT = 16;
  logic clk = 0, rst_n;
  logic ld_en, ld_sel, start, ready, done, level_start, cand_issue;
  logic [6:0] ld_x, ref_x;
  logic [5:0] ld_y, ref_y;
  pixel_t ld_data;
  logic [5:0] disparity;
  logic [12:0] best_sad;
  logic [3:0] cur_sp;
  pixel_t limg [W][H];
  pixel_t rimg [W][H];
  int checks = 0, failures = 0;
  int levels;

  stereo_processor #(.IMG_W(W), .IMG_H(H)) dut (.*);

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
    sp = 8; lo = 0; hi = DMAX; step = 8; cyc = 0;
    forever begin
      n = 0; bestd = 0; bests = 0;
      for (int d = lo; d <= hi; d += step) begin
        s = 0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
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
        ld_en = 1; ld_sel = sel; ld_x = 7'(x); ld_y = 6'(y);
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
    start = 1; ref_x = 7'(rx); ref_y = 6'(ry); levels = 0;
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
    check(levels == 8, $sformatf("levels %0d", levels));
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
    for (int i = 0; i < 12; i++) search($urandom_range(0, W - 1 - DMAX - 24), $urandom_range(0, H - 1 - 24), 1);
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) rimg[x][y] = pixel_t'($urandom);
    load(1);
    for (int i = 0; i < 30; i++) search($urandom_range(0, W - 1 - DMAX - 24), $urandom_range(0, H - 1 - 24), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
