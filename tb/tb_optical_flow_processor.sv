// Testbench for optical_flow_processor on a 40 x 36 image (E = 10, 10 x 10
// search area, diagonal allocation over 10 modules).
// Phase 1: the candidate image is the reference image moved by (+2, -3), so
// every search must return motion vector (2, -3) with SAD 0.
// Phase 2: an unrelated random candidate image; each result is compared with
// a behavioural full search that visits candidates in the same square-wave
// order (down the first column, up the next, ...; earliest minimum wins).
// Timing: each search issues exactly 109 line reads on consecutive cycles
// (10 fill rows, 45 down, 45 up, 9 right) and 'done' is seen 112 clock edges
// after the edge that accepts start (4 cycles after the last read).
// Phase 3 holds start high back to back: results must
// come every 109 cycles, in order.
module tb_optical_flow_processor;
  import pma_pkg::*;
  localparam int W = 40, H = 36, E = 10, SR = 10, DU = 2, DV = -3;
  logic clk = 0, rst_n;
  logic ld_en, ld_sel, start, ready, done, ev_fill, ev_down, ev_up, ev_right;
  logic [5:0] ld_x, ref_x;
  logic [5:0] ld_y, ref_y;
  pixel_t ld_data;
  logic signed [4:0] mv_u, mv_v;
  logic [14:0] best_sad;
  pixel_t timg [W][H];
  pixel_t cimg [W][H];
  int checks = 0, failures = 0;
  int nfill, ndown, nup, nright, nissue;

  optical_flow_processor #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    nfill  += int'(ev_fill);
    ndown  += int'(ev_down);
    nup    += int'(ev_up);
    nright += int'(ev_right);
    nissue += int'(ev_fill | ev_down | ev_up | ev_right);
  end

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

  task automatic model(input int rx, input int ry, output int u_res, output int v_res, output int sad_res);
    int first, s, cv;
    first = 1;
    for (int cu = 0; cu < SR; cu++)
      for (int i = 0; i < SR; i++) begin
        cv = (cu % 2 == 0) ? i : SR - 1 - i;
        s = 0;
        for (int r = 0; r < E; r++)
          for (int c = 0; c < E; c++)
            s += absdiff(timg[rx + c][ry + r], cimg[rx + cu - SR/2 + c][ry + cv - SR/2 + r]);
        if (first == 1 || s < sad_res) begin
          sad_res = s; u_res = cu - SR/2; v_res = cv - SR/2;
        end
        first = 0;
      end
  endtask

  task automatic load(input bit sel);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        ld_en = 1; ld_sel = sel; ld_x = 6'(x); ld_y = 6'(y);
        ld_data = sel ? cimg[x][y] : timg[x][y];
      end
    @(negedge clk);
    ld_en = 0;
  endtask

  task automatic search(input int rx, input int ry, input bit exact);
    int wu, wv, ws, cyc;
    model(rx, ry, wu, wv, ws);
    @(negedge clk);
    check(ready, "ready before start");
    start = 1; ref_x = 6'(rx); ref_y = 6'(ry);
    nfill = 0; ndown = 0; nup = 0; nright = 0; nissue = 0;
    @(posedge clk);
    #1 start = 0;
    cyc = 0;
    while (!done && cyc < 1000) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(int'(mv_u) == wu && int'(mv_v) == wv,
          $sformatf("(%0d,%0d) mv (%0d,%0d) want (%0d,%0d)", rx, ry, mv_u, mv_v, wu, wv));
    check(int'(best_sad) == ws, $sformatf("(%0d,%0d) sad %0d want %0d", rx, ry, best_sad, ws));
    check(cyc == 112, $sformatf("latency %0d", cyc));
    check(nissue == 109 && nfill == 10 && ndown == 45 && nup == 45 && nright == 9,
          $sformatf("reads %0d fill %0d down %0d up %0d right %0d", nissue, nfill, ndown, nup, nright));
    if (exact) check(int'(mv_u) == DU && int'(mv_v) == DV && best_sad == 0, "moved image: exact match");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bq_x [8], bq_y [8];
  int acc_idx, done_idx, last_done;

  initial begin
    rst_n = 0; ld_en = 0; ld_sel = 0; ld_x = 0; ld_y = 0; ld_data = 0;
    start = 0; ref_x = 0; ref_y = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) timg[x][y] = pixel_t'($urandom);
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++)
        cimg[x][y] = (x - DU >= 0 && y - DV < H) ? timg[x-DU][y-DV] : pixel_t'($urandom);
    load(0);
    load(1);
    for (int i = 0; i < 6; i++) search($urandom_range(SR/2, W - SR/2 - E), $urandom_range(SR/2, H - SR/2 - E), 1);
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y++) cimg[x][y] = pixel_t'($urandom);
    load(1);
    for (int i = 0; i < 10; i++) search($urandom_range(SR/2, W - SR/2 - E), $urandom_range(SR/2, H - SR/2 - E), 0);

    // back to back
    foreach (bq_x[i]) begin
      bq_x[i] = $urandom_range(SR/2, W - SR/2 - E);
      bq_y[i] = $urandom_range(SR/2, H - SR/2 - E);
    end
    acc_idx = 0; done_idx = 0; last_done = -1;
    @(negedge clk);  // let the previous done pulse pass
    for (int t = 0; t < 8 * 109 + 200 && done_idx < 8; t++) begin
      @(negedge clk);
      if (done) begin
        int wu, wv, ws;
        model(bq_x[done_idx], bq_y[done_idx], wu, wv, ws);
        check(int'(mv_u) == wu && int'(mv_v) == wv && int'(best_sad) == ws,
              $sformatf("back-to-back result %0d", done_idx));
        if (last_done >= 0) check(t - last_done == 109, $sformatf("interval %0d", t - last_done));
        last_done = t;
        done_idx++;
      end
      if (acc_idx < 8) begin
        start = 1; ref_x = 6'(bq_x[acc_idx]); ref_y = 6'(bq_y[acc_idx]);
      end else start = 0;
      #1 if (start && ready) acc_idx++;
    end
    check(done_idx == 8, "all back-to-back results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
