// Testbench for ad_unit: all 65536 input pairs with en high, plus random
// pairs with en low (output must be 0).
module tb_ad_unit;
  import pma_pkg::*;
  pixel_t a, b, d;
  logic en;
  int checks = 0, failures = 0;
  int want;

  ad_unit dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1;
    #1;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin

        a = 8'(i); b = 8'(j); #1;
        want = (i > j) ? i - j : j - i;
        checks++;
        if (int'(d) != want) begin
          failures++;
          if (failures < 10) $display("FAIL: |%0d-%0d| got %0d", i, j, d);
        end
      end
    en = 0;
    #1;
    for (int i = 0; i < 500; i++) begin
      a = 8'($urandom); b = 8'($urandom); #1;
      checks++;
      if (d != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
