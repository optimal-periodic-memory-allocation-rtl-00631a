// Testbench for mem_module: random writes and reads against a reference
// array; checks the one-cycle read latency and that writes leave rdata alone.
module tb_mem_module;
  localparam int DEPTH = 64;
  logic clk = 0, en, we;
  logic [5:0] addr;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [DEPTH];
  bit written [DEPTH];

  mem_module #(.DEPTH(DEPTH), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] last_read;
    en = 0; we = 0; addr = 0; wdata = 0;
    foreach (written[i]) written[i] = 0;
    // fill everything once
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 6'(i); wdata = 8'($urandom);
      ref_mem[i] = wdata; written[i] = 1;
    end
    @(negedge clk); en = 0; we = 0;
    for (int i = 0; i < 3000; i++) begin
      int op;
      op = $urandom_range(2);
      @(negedge clk);
      addr = 6'($urandom_range(DEPTH-1));
      if (op == 0) begin
        en = 1; we = 1; wdata = 8'($urandom);
        last_read = rdata;
        @(negedge clk); en = 0; we = 0;
        checks++; if (rdata !== last_read) begin failures++; $display("FAIL: write changed rdata"); end
        ref_mem[addr] = wdata;
      end else if (op == 1) begin
        en = 1; we = 0;
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== ref_mem[addr]) begin
          failures++; $display("FAIL: read %0d got %0h want %0h", addr, rdata, ref_mem[addr]);
        end
        // held while idle
        last_read = rdata;
        @(negedge clk);
        checks++; if (rdata !== last_read) begin failures++; $display("FAIL: rdata not held"); end
      end else begin
        en = 0; we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
