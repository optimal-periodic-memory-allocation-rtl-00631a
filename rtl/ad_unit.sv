// Absolute-difference unit: the processing element attached to one memory
// module in the matching processors (the type-A operation of the window
// schedule). d = |a - b| when en is high, 0 otherwise, so an idle module
// contributes nothing to the sum. Combinational.
module ad_unit
  import pma_pkg::*;
(
  input  pixel_t a,
  input  pixel_t b,
  input  logic   en,
  output pixel_t d
);

  always_comb begin
    if (!en)        d = '0;
    else if (a > b) d = a - b;
    else            d = b - a;
  end

endmodule
