// Testbench for window_memory with the stereo allocation (17 modules,
// A=(17,0), B=(4,1)) on a 64 x 40 image. A random image is loaded through
// the write port, then one 4 x 4 window, sampled at a random period 1..8, is
// read every cycle. Each result is checked one cycle later in both views:
// window order against the image, and per module (the pixel, which window
// pixel it is, exactly 16 modules busy). The conflict flag must be low for
// these windows and high for a window that repeats a pixel.
module tb_window_memory;
  import pma_pkg::*;
  localparam int W = 64, H = 40, NPIX = 16, K = 17;
  logic clk = 0, rst_n;
  logic wr_en, rd_en, conflict, rd_valid;
  logic [5:0] wr_x, org_x;
  logic [5:0] wr_y, org_y;
  pixel_t wr_data;
  logic [5:0] off_x [NPIX];
  logic [5:0] off_y [NPIX];
  pixel_t bank_data [K];
  logic [3:0] bank_idx [K];
  logic bank_used [K];
  pixel_t win_data [NPIX];
  pixel_t img [W][H];
  int checks = 0, failures = 0;

  window_memory #(.AX(17), .BX(4), .BY(1), .IMG_W(W), .IMG_H(H), .NPIX(NPIX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0; wr_x = 0; wr_y = 0; wr_data = 0; org_x = 0; org_y = 0;
    foreach (off_x[j]) begin off_x[j] = 0; off_y[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[x][y] = pixel_t'($urandom);
        @(negedge clk);
        wr_en = 1; wr_x = 6'(x); wr_y = 6'(y); wr_data = img[x][y];
      end
    @(negedge clk);
    wr_en = 0;
    // a window that repeats pixel (0,0) must be flagged
    foreach (off_x[j]) begin off_x[j] = 0; off_y[j] = 0; end
    #1 check(conflict, "repeated pixel not flagged");
    for (int t = 0; t < 3000; t++) begin
      int sp, ox, oy;
      sp = $urandom_range(1, 8);
      ox = $urandom_range(0, W - 1 - 3*sp);
      oy = $urandom_range(0, H - 1 - 3*sp);
      rd_en = 1; org_x = 6'(ox); org_y = 6'(oy);
      for (int j = 0; j < NPIX; j++) begin
        off_x[j] = 6'(sp * (j % 4));
        off_y[j] = 6'(sp * (j / 4));
      end
      #1 check(!conflict, "conflict flagged for a legal window");
      @(negedge clk);
      // move the read inputs away: the returned data must not follow them
      rd_en = 0;
      foreach (off_x[j]) begin off_x[j] = 0; off_y[j] = 0; end
      #1;
      check(rd_valid, "rd_valid");
      begin
        int nused;
        nused = 0;
        for (int j = 0; j < NPIX; j++)
          check(win_data[j] == img[ox + sp*(j%4)][oy + sp*(j/4)],
                $sformatf("win_data[%0d] sp=%0d org=(%0d,%0d)", j, sp, ox, oy));
        for (int k = 0; k < K; k++)
          if (bank_used[k]) begin
            int px, py;
            px = ox + sp*(int'(bank_idx[k]) % 4);
            py = oy + sp*(int'(bank_idx[k]) / 4);
            nused++;
            check(bank_data[k] == img[px][py], $sformatf("module %0d data", k));
            check(((px - 4*py) % 17 + 17) % 17 == k,
                  $sformatf("module %0d holds the wrong pixel", k));
          end
        check(nused == NPIX, "16 modules busy");
      end
    end
    rd_en = 0;
    @(negedge clk);
    check(!rd_valid, "rd_valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
