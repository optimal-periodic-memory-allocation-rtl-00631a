// Single-port memory module.
//
// One read or one write per cycle through a single address port, as in the
// target architecture where each module serves exactly one processing
// element. Reads are synchronous: rdata shows the addressed word in the cycle
// after en is high with we low. A write leaves rdata unchanged. The word
// array has no reset; whatever is read must have been written first.
module mem_module #(
  parameter int unsigned DEPTH = 15000,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
