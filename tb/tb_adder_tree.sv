// Testbench for adder_tree: the 17-input tree of the stereo matcher and the
// 100-input tree of the optical-flow matcher, random and all-maximum inputs,
// against a plain sum.
module tb_adder_tree;
  logic [7:0]  in17 [17];
  logic [12:0] sum17;
  logic [7:0]  in100 [100];
  logic [14:0] sum100;
  int checks = 0, failures = 0;

  adder_tree #(.N(17),  .IW(8)) u17  (.in(in17),  .sum(sum17));
  adder_tree #(.N(100), .IW(8)) u100 (.in(in100), .sum(sum100));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int s17, s100;
      bit full;
      s17 = 0; s100 = 0; full = (t < 2);
      foreach (in17[i])  begin in17[i]  = full ? 8'hff : 8'($urandom); s17  += in17[i];  end
      foreach (in100[i]) begin in100[i] = full ? 8'hff : 8'($urandom); s100 += in100[i]; end
      #1;
      checks += 2;
      if (int'(sum17) != s17)   begin failures++; $display("FAIL: 17-sum %0d want %0d", sum17, s17); end
      if (int'(sum100) != s100) begin failures++; $display("FAIL: 100-sum %0d want %0d", sum100, s100); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
