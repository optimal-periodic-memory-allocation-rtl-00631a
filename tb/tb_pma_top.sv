// End-to-end testbench for pma_top at its default size (500 x 500 images).
//
// Stereo matcher: a random reference image; the candidate image has three
// horizontal bands. Rows 0..165 equal the reference (disparity 0), rows
// 166..332 are the reference moved right by 40, and rows 333..499 hold a
// step (reference all 0, candidate 0 from column 160 on, 200 before it) so
// that a search from x = 100 ends at disparity 60. Every search is compared
// with a behavioural model of the coarse-to-fine search, including its
// cycle count.
// Optical-flow matcher: a random image at T and the same image moved by
// (+3, +2) at T+dT, loaded at the same time as the stereo images; searches
// run one at a time and back to back while the stereo matcher is busy, and
// must return (3, 2) with SAD 0.
// Mechanisms counted (each must occur): resolution levels, refinement range
// clipped at 0 and at the largest disparity, the idle 17th module on a
// stereo read, row reads downwards and upwards, column reads, fill reads, a
// start taken in the last read cycle of the previous search.
module tb_pma_top;
  import pma_pkg::*;
  localparam int W = 500, H = 500, DMAX = 63;
  logic clk = 0, rst_n;
  logic st_ld_en, st_ld_sel, st_start, st_ready, st_done, st_level_start, st_cand_issue;
  logic [8:0] st_ld_x, st_ref_x, of_ld_x, of_ref_x;
  logic [8:0] st_ld_y, st_ref_y, of_ld_y, of_ref_y;
  pixel_t st_ld_data, of_ld_data;
  logic [5:0] st_disparity;
  logic [12:0] st_best_sad;
  logic [3:0] st_cur_sp;
  logic of_ld_en, of_ld_sel, of_start, of_ready, of_done, of_ev_fill, of_ev_down, of_ev_up, of_ev_right;
  logic signed [4:0] of_mv_u, of_mv_v;
  logic [14:0] of_best_sad;

  pixel_t limg [W][H];
  pixel_t rimg [W][H];
  pixel_t timg [W][H];
  pixel_t cimg [W][H];
  int checks = 0, failures = 0;
  int n_levels, n_clip_lo, n_clip_hi, n_idle_module, n_cand;
  int n_fill, n_down, n_up, n_right, n_b2b, n_of_done;

  pma_top dut (.*);

  always #5 clk = ~clk;

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

  // ---- event counters -------------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    int nu;
    if (st_level_start) n_levels++;
    if (st_cand_issue) n_cand++;
    if (dut.u_stereo.u_cand_mem.rd_valid) begin
      nu = 0;
      foreach (dut.u_stereo.u_cand_mem.bank_used[k]) nu += int'(dut.u_stereo.u_cand_mem.bank_used[k]);
      if (nu == 16) n_idle_module++;
      else check(0, "stereo read does not use 16 of 17 modules");
    end
    n_fill  += int'(of_ev_fill);
    n_down  += int'(of_ev_down);
    n_up    += int'(of_ev_up);
    n_right += int'(of_ev_right);
    if (of_start && of_ready && (of_ev_down || of_ev_up || of_ev_right)) n_b2b++;
    if (of_done) begin
      n_of_done++;
      check(of_mv_u == 3 && of_mv_v == 2 && of_best_sad == 0,
            $sformatf("optical flow result (%0d,%0d) sad %0d", of_mv_u, of_mv_v, of_best_sad));
    end
  end

  // ---- stereo model -----------------------------------------------------------
  task automatic st_model(input int rx, input int ry, output int d_res, output int sad_res, output int cyc,
                          output int clip_lo, output int clip_hi);
    int sp, lo, hi, step, bestd, bests, n, s;
    sp = 8; lo = 0; hi = DMAX; step = 8; cyc = 0; clip_lo = 0; clip_hi = 0;
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
      if (bestd < sp) clip_lo++;
      if (bestd + sp > DMAX) clip_hi++;
      lo = (bestd > sp) ? bestd - sp : 0;
      hi = (bestd + sp > DMAX) ? DMAX : bestd + sp;
      step = 1;
    end
    d_res = bestd; sad_res = bests;
  endtask

  task automatic st_search(input int rx, input int ry, input int want_exact);
    int wd, ws, wc, cl, ch, cyc, lv0;
    st_model(rx, ry, wd, ws, wc, cl, ch);
    @(negedge clk);
    check(st_ready, "stereo ready");
    st_start = 1; st_ref_x = 9'(rx); st_ref_y = 9'(ry);
    lv0 = n_levels;
    @(posedge clk);
    #1 st_start = 0;
    cyc = 0;
    while (!st_done && cyc < 3000) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(int'(st_disparity) == wd && int'(st_best_sad) == ws,
          $sformatf("stereo (%0d,%0d): d %0d sad %0d, want d %0d sad %0d", rx, ry, st_disparity, st_best_sad, wd, ws));
    check(cyc == wc, $sformatf("stereo cycles %0d want %0d", cyc, wc));
    check(n_levels - lv0 == 8, "stereo: 8 levels");
    if (want_exact >= 0) check(int'(st_disparity) == want_exact, $sformatf("stereo exact d=%0d", want_exact));
    n_clip_lo += cl;
    n_clip_hi += ch;
  endtask

  // ---- optical-flow driver ------------------------------------------------------
  task automatic of_run(input int n, input bit b2b);
    int acc;
    acc = 0;
    while (acc < n) begin
      @(negedge clk);
      of_start = 1;
      of_ref_x = 9'($urandom_range(5, W - 15));
      of_ref_y = 9'($urandom_range(5, H - 15));
      #1 if (of_ready) acc++;
      if (!b2b) begin
        @(posedge clk); #1 of_start = 0;
        wait (of_done);
        @(posedge clk);
      end
    end
    @(negedge clk);
    of_start = 0;
  endtask

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base;
    rst_n = 0;
    st_ld_en = 0; st_ld_sel = 0; st_ld_x = 0; st_ld_y = 0; st_ld_data = 0; st_start = 0; st_ref_x = 0; st_ref_y = 0;
    of_ld_en = 0; of_ld_sel = 0; of_ld_x = 0; of_ld_y = 0; of_ld_data = 0; of_start = 0; of_ref_x = 0; of_ref_y = 0;
    {n_levels, n_clip_lo, n_clip_hi, n_idle_module, n_cand} = '0;
    {n_fill, n_down, n_up, n_right, n_b2b, n_of_done} = '0;

    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) begin
        limg[x][y] = (y >= 333) ? 8'd0 : pixel_t'($urandom);
        timg[x][y] = pixel_t'($urandom);
      end
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) begin
        if (y < 166)      rimg[x][y] = limg[x][y];
        else if (y < 333) rimg[x][y] = (x >= 40) ? limg[x-40][y] : pixel_t'($urandom);
        else              rimg[x][y] = (x >= 160) ? 8'd0 : 8'd200;
        cimg[x][y] = (x >= 3 && y >= 2) ? timg[x-3][y-2] : pixel_t'($urandom);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // load all four images, both processors in parallel
    for (int s = 0; s < 2; s++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          st_ld_en = 1; st_ld_sel = s[0]; st_ld_x = 9'(x); st_ld_y = 9'(y);
          st_ld_data = s[0] ? rimg[x][y] : limg[x][y];
          of_ld_en = 1; of_ld_sel = s[0]; of_ld_x = 9'(x); of_ld_y = 9'(y);
          of_ld_data = s[0] ? cimg[x][y] : timg[x][y];
        end
    @(negedge clk);
    st_ld_en = 0; of_ld_en = 0;

    fork
      begin
        for (int i = 0; i < 3; i++) st_search($urandom_range(0, W - 1 - DMAX - 24), $urandom_range(0, 165 - 24), 0);
        for (int i = 0; i < 3; i++) st_search($urandom_range(0, W - 1 - DMAX - 24), $urandom_range(166, 332 - 24), 40);
        st_search(100, 400, 60);
        st_search(100, 333, 60);
      end
      begin
        of_run(3, 0);
        of_run(4, 1);
        wait (n_of_done == 7);
      end
    join
    repeat (10) @(posedge clk);

    check(n_of_done == 7, $sformatf("optical flow searches done %0d", n_of_done));
    $display("events: levels=%0d stereo_reads=%0d idle_module_reads=%0d clip_lo=%0d clip_hi=%0d",
             n_levels, n_cand, n_idle_module, n_clip_lo, n_clip_hi);
    $display("events: of_fill=%0d of_down=%0d of_up=%0d of_right=%0d of_back_to_back=%0d",
             n_fill, n_down, n_up, n_right, n_b2b);
    check(n_levels > 0, "levels");
    check(n_idle_module > 0, "idle module");
    check(n_clip_lo > 0, "clip low");
    check(n_clip_hi > 0, "clip high");
    check(n_fill > 0 && n_down > 0 && n_up > 0 && n_right > 0, "optical flow moves");
    check(n_b2b > 0, "back-to-back start");
    check(n_fill == 70 && n_down == 315 && n_up == 315 && n_right == 63, "optical flow read counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
