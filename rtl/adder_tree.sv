// Adder tree: sums N unsigned inputs (the type-B operation that merges the
// outputs of the processing elements). A balanced binary tree of N-1 adders;
// the tree is padded with zero leaves up to a power of two, which synthesis
// removes. Combinational; the output is wide enough never to overflow.
module adder_tree #(
  parameter int unsigned N  = 17,
  parameter int unsigned IW = 8,
  localparam int unsigned OW = IW + ((N > 1) ? $clog2(N) : 1)
) (
  input  logic [IW-1:0] in [N],
  output logic [OW-1:0] sum
);

  localparam int unsigned NP = 1 << ((N > 1) ? $clog2(N) : 1);

  logic [OW-1:0] node [2*NP];

  always_comb begin
    node[0] = '0;
    for (int unsigned i = 0; i < NP; i++)
      node[NP+i] = (i < N) ? OW'(in[i]) : '0;
    for (int unsigned i = NP - 1; i >= 1; i--)
      node[i] = node[2*i] + node[2*i+1];
    sum = node[1];
  end

endmodule
