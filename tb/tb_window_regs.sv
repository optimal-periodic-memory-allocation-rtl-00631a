// Testbench for window_regs: random sequences of the four operations on a
// 10 x 10 array, compared after every cycle with a model array moved by the
// same rules (down: new bottom row, up: new top row, right: new right column).
module tb_window_regs;
  import pma_pkg::*;
  localparam int E = 10;
  logic clk = 0, rst_n;
  shift_op_e op;
  pixel_t line [E];
  pixel_t win  [E][E];
  pixel_t model [E][E];
  int checks = 0, failures = 0;
  int nops [4];

  window_regs #(.E(E)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pixel_t nxt [E][E];
    rst_n = 0; op = SHIFT_HOLD;
    foreach (line[i]) line[i] = '0;
    foreach (nxt[r, c]) nxt[r][c] = '0;
    foreach (nops[i]) nops[i] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    foreach (model[r, c]) model[r][c] = '0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      op = shift_op_e'($urandom_range(3));
      foreach (line[i]) line[i] = pixel_t'($urandom);
      nops[op]++;
      for (int r = 0; r < E; r++)
        for (int c = 0; c < E; c++)
          case (op)
            SHIFT_BOTTOM: nxt[r][c] = (r == E-1) ? line[c] : model[r+1][c];
            SHIFT_TOP:    nxt[r][c] = (r == 0)   ? line[c] : model[r-1][c];
            SHIFT_RIGHT:  nxt[r][c] = (c == E-1) ? line[r] : model[r][c+1];
            default:      nxt[r][c] = model[r][c];
          endcase
      @(posedge clk); #1;
      model = nxt;
      for (int r = 0; r < E; r++)
        for (int c = 0; c < E; c++) begin
          checks++;
          if (win[r][c] !== model[r][c]) begin
            failures++;
            if (failures < 10) $display("FAIL: t=%0d op=%s [%0d][%0d]", t, op.name(), r, c);
          end
        end
    end
    foreach (nops[i]) begin checks++; if (nops[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
