// Minimum selector: keeps the smallest SAD seen in a search and the tag
// (candidate position) that produced it.
//
// A sample with in_first high starts a new search: it is taken whatever its
// value. Later samples replace the best only when strictly smaller, so among
// equal SADs the earliest candidate wins. One sample per cycle; best_sad and
// best_tag show the result in the cycle after the sample.
module min_select #(
  parameter int unsigned SW = 13,
  parameter int unsigned TW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic [SW-1:0] in_sad,
  input  logic [TW-1:0] in_tag,
  output logic [SW-1:0] best_sad,
  output logic [TW-1:0] best_tag
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      best_sad <= '1;
      best_tag <= '0;
    end else if (in_valid && (in_first || in_sad < best_sad)) begin
      best_sad <= in_sad;
      best_tag <= in_tag;
    end
  end

endmodule
