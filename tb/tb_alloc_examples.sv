// Checks periodic_addr against published allocation tables.
// Each table gives the module label of every pixel in a 10 x 10 corner of
// the image (row strings, top row first, so the last string is y = 0). The
// testbench reads the period vectors off each table and checks that
// periodic_addr with those vectors groups the pixels exactly as the table
// does: the same labels give the same module and different labels give
// different modules. The tables:
//   6 modules, A=(2,0) B=(1,3): one window read in a single step
//   4 modules, A=(4,0) B=(2,1): a window split over two steps (type 1)
//   3 modules, A=(1,0) B=(0,3): a window split over two steps (type 2)
//   9 modules, A=(3,0) B=(0,3): the 3 x 3 rectangular allocation
module tb_alloc_examples;
  int checks = 0, failures = 0;

  string t6 [10] = '{"2121212121", "5656565656", "3434343434", "1212121212", "6565656565",
                     "4343434343", "2121212121", "5656565656", "3434343434", "1212121212"};
  string t4 [10] = '{"3412341234", "1234123412", "3412341234", "1234123412", "3412341234",
                     "1234123412", "3412341234", "1234123412", "3412341234", "1234123412"};
  string t3 [10] = '{"1111111111", "3333333333", "2222222222", "1111111111", "3333333333",
                     "2222222222", "1111111111", "3333333333", "2222222222", "1111111111"};
  string t9 [6]  = '{"789789", "456456", "123123", "789789", "456456", "123123"};

  logic [3:0] x;
  logic [3:0] y;
  logic [2:0] b6;  logic [5:0] a6;
  logic [1:0] b4;  logic [4:0] a4;
  logic [1:0] b3;  logic [5:0] a3;
  logic [3:0] b9;  logic [5:0] a9;

  periodic_addr #(.AX(2), .BX(1), .BY(3), .IMG_W(10), .IMG_H(10)) u6 (.x(x), .y(y), .bank(b6), .addr(a6));
  periodic_addr #(.AX(4), .BX(2), .BY(1), .IMG_W(10), .IMG_H(10)) u4 (.x(x), .y(y), .bank(b4), .addr(a4));
  periodic_addr #(.AX(1), .BX(0), .BY(3), .IMG_W(10), .IMG_H(10)) u3 (.x(x), .y(y), .bank(b3), .addr(a3));
  periodic_addr #(.AX(3), .BX(0), .BY(3), .IMG_W(10), .IMG_H(10)) u9 (.x(x), .y(y), .bank(b9), .addr(a9));

  // label of pixel (px, py) in a table with n rows
  function automatic int label(string t [], int px, int py);
    return int'(t[t.size() - 1 - py][px]) - int'("0");
  endfunction

  task automatic compare(string name, string t [], int w, int which);
    int lab [10][10];
    int bk [10][10];
    for (int py = 0; py < t.size(); py++)
      for (int px = 0; px < w; px++) begin
        x = 4'(px); y = 4'(py); #1;
        lab[px][py] = label(t, px, py);
        case (which)
          6: bk[px][py] = int'(b6);
          4: bk[px][py] = int'(b4);
          3: bk[px][py] = int'(b3);
          default: bk[px][py] = int'(b9);
        endcase
      end
    for (int p = 0; p < w * t.size(); p++)
      for (int q = 0; q < w * t.size(); q++) begin
        int px, py, qx, qy;
        px = p % w; py = p / w; qx = q % w; qy = q / w;
        checks++;
        if ((lab[px][py] == lab[qx][qy]) != (bk[px][py] == bk[qx][qy])) begin
          failures++;
          if (failures < 10) $display("FAIL: %s (%0d,%0d) vs (%0d,%0d)", name, px, py, qx, qy);
        end
      end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    compare("6-module", t6, 10, 6);
    compare("4-module", t4, 10, 4);
    compare("3-module", t3, 10, 3);
    compare("9-module", t9, 6, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
