// Testbench for periodic_addr.
// Three allocations are checked against properties worked out by hand:
//  - A=(2,0), B=(1,2): two pixels share a module exactly when they share
//    (2x + y) mod 4, the closed-form addressing function of that allocation.
//  - A=(5,0), B=(4,3): 15 modules, every module is invariant under both
//    period vectors, and (module, address) is unique over the image.
//  - A=(17,0), B=(4,1) on 500 x 500: module = (x - 4y) mod 17, address
//    = y*30 + x/17, and every 4 x 4 window sampled at periods 1..8 hits 16
//    different modules.
module tb_periodic_addr;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // ---- allocation 1: A=(2,0) B=(1,2), 16 x 16 image ----
  logic [3:0] x1, y1;
  logic [1:0] b1;
  logic [6:0] a1;
  periodic_addr #(.AX(2), .BX(1), .BY(2), .IMG_W(16), .IMG_H(16)) u1 (.x(x1), .y(y1), .bank(b1), .addr(a1));

  // ---- allocation 2: A=(5,0) B=(4,3), 30 x 24 image ----
  logic [4:0] x2, y2;
  logic [3:0] b2;
  logic [7:0] a2;
  periodic_addr #(.AX(5), .BX(4), .BY(3), .IMG_W(30), .IMG_H(24)) u2 (.x(x2), .y(y2), .bank(b2), .addr(a2));

  // ---- allocation 3: stereo default ----
  logic [8:0] x3, y3;
  logic [4:0] b3;
  logic [13:0] a3;
  periodic_addr u3 (.x(x3), .y(y3), .bank(b3), .addr(a3));

  int bank1 [16][16];
  int bank2 [30][24];
  int addr2 [30][24];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // allocation 1
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        x1 = 4'(x); y1 = 4'(y); #1;
        bank1[x][y] = int'(b1);
      end
    for (int i = 0; i < 400; i++) begin
      int xa, ya, xb, yb;
      xa = $urandom_range(15); ya = $urandom_range(15);
      xb = $urandom_range(15); yb = $urandom_range(15);
      check((bank1[xa][ya] == bank1[xb][yb]) == (((2*xa+ya) % 4) == ((2*xb+yb) % 4)),
            $sformatf("alloc1 partition (%0d,%0d) (%0d,%0d)", xa, ya, xb, yb));
    end

    // allocation 2
    for (int x = 0; x < 30; x++)
      for (int y = 0; y < 24; y++) begin
        x2 = 5'(x); y2 = 5'(y); #1;
        bank2[x][y] = int'(b2);
        addr2[x][y] = int'(a2);
        check(b2 < 15, "alloc2 module range");
        check(a2 < 8 * 6, "alloc2 address range");
      end
    for (int x = 0; x < 30; x++)
      for (int y = 0; y < 24; y++) begin
        if (x + 5 < 30) check(bank2[x][y] == bank2[x+5][y], "alloc2 period A");
        if (x + 4 < 30 && y + 3 < 24) check(bank2[x][y] == bank2[x+4][y+3], "alloc2 period B");
        for (int xx = 0; xx < 30; xx++)
          for (int yy = 0; yy < 24; yy++)
            if ((xx != x || yy != y) && bank2[x][y] == bank2[xx][yy] && addr2[x][y] == addr2[xx][yy])
              check(0, $sformatf("alloc2 duplicate word (%0d,%0d) (%0d,%0d)", x, y, xx, yy));
      end
    begin
      bit seen [15];
      int cnt;
      cnt = 0;
      foreach (seen[i]) seen[i] = 0;
      for (int x = 0; x < 5; x++) for (int y = 0; y < 3; y++) seen[bank2[x][y]] = 1;
      foreach (seen[i]) cnt += int'(seen[i]);
      check(cnt == 15, "alloc2: 15 modules in one period rectangle");
    end

    // allocation 3
    for (int i = 0; i < 3000; i++) begin
      int x, y;
      x = $urandom_range(499); y = $urandom_range(499);
      x3 = 9'(x); y3 = 9'(y); #1;
      check(int'(b3) == ((x - 4*y) % 17 + 17) % 17, $sformatf("alloc3 module (%0d,%0d)", x, y));
      check(int'(a3) == y*30 + x/17, $sformatf("alloc3 address (%0d,%0d)", x, y));
    end
    for (int sp = 1; sp <= 8; sp++)
      for (int ox = 0; ox < 17; ox++)
        for (int oy = 0; oy < 17; oy++) begin
          bit used [17];
          bit ok;
          ok = 1;
          foreach (used[i]) used[i] = 0;
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) begin
              x3 = 9'(ox + sp*c); y3 = 9'(oy + sp*r); #1;
              if (used[b3]) ok = 0;
              used[b3] = 1;
            end
          check(ok, $sformatf("alloc3 parallel access sp=%0d org=(%0d,%0d)", sp, ox, oy));
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
