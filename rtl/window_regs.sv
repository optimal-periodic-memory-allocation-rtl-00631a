// Window register array: holds an E x E window of pixels and moves it by one
// pixel per cycle, taking in only the line of E pixels that the move uncovers.
//
// This is the pixel reuse of the optical-flow processor: when a candidate
// window steps down, up or right, E*(E-1) pixels are kept and only one new
// row or column comes from the memory modules. win[r][c] is row r (0 = top),
// column c (0 = left). The operation (see pma_pkg::shift_op_e) and the new
// line are applied at the clock edge; for SHIFT_BOTTOM/SHIFT_TOP line[c] is
// the pixel of column c, for SHIFT_RIGHT line[r] is the pixel of row r.
// Reset clears the array.
module window_regs
  import pma_pkg::*;
#(
  parameter int unsigned E = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  shift_op_e op,
  input  pixel_t    line [E],
  output pixel_t    win  [E][E]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < E; r++)
        for (int unsigned c = 0; c < E; c++) win[r][c] <= '0;
    end else begin
      unique case (op)
        SHIFT_BOTTOM: begin
          for (int unsigned r = 0; r + 1 < E; r++) win[r] <= win[r+1];
          for (int unsigned c = 0; c < E; c++) win[E-1][c] <= line[c];
        end
        SHIFT_TOP: begin
          for (int unsigned r = 1; r < E; r++) win[r] <= win[r-1];
          for (int unsigned c = 0; c < E; c++) win[0][c] <= line[c];
        end
        SHIFT_RIGHT: begin
          for (int unsigned r = 0; r < E; r++) begin
            for (int unsigned c = 0; c + 1 < E; c++) win[r][c] <= win[r][c+1];
            win[r][E-1] <= line[r];
          end
        end
        default: ;
      endcase
    end
  end

endmodule
