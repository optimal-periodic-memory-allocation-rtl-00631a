// Testbench for min_select: random search sequences of random length, with
// idle cycles and deliberate ties; the expected minimum (earliest wins on a
// tie) is tracked in the testbench.
module tb_min_select;
  logic clk = 0, rst_n, in_valid, in_first;
  logic [12:0] in_sad, best_sad;
  logic [5:0]  in_tag, best_tag;
  int checks = 0, failures = 0;

  min_select #(.SW(13), .TW(6)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; in_first = 0; in_sad = 0; in_tag = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      int n, want_sad, want_tag;
      n = $urandom_range(1, 40); want_sad = 0; want_tag = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        if ($urandom_range(3) == 0 && i > 0) begin
          in_valid = 0;          // bubble
          @(negedge clk);
        end
        in_valid = 1;
        in_first = (i == 0);
        in_sad   = ($urandom_range(2) == 0 && i > 0) ? 13'(want_sad) : 13'($urandom_range(300));
        in_tag   = 6'(i);
        if (i == 0 || int'(in_sad) < want_sad) begin want_sad = in_sad; want_tag = i; end
      end
      @(negedge clk);
      in_valid = 0;
      @(negedge clk);
      checks += 2;
      if (int'(best_sad) != want_sad) begin failures++; $display("FAIL: sad %0d want %0d", best_sad, want_sad); end
      if (int'(best_tag) != want_tag) begin failures++; $display("FAIL: tag %0d want %0d", best_tag, want_tag); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
