// Periodic addressing function: pixel (x, y) -> (memory module, word address).
//
// The image is tiled by the lattice spanned by two period vectors. In their
// equivalent form A = (AX, 0) and B = (BX, BY), with 0 <= BX < AX, every pixel
// of one coset of that lattice lives in the same module, and there are
// K = AX * BY modules (the area of the parallelogram A, B). For pixel (x, y):
//   n    = y / BY            (index of the horizontal band of height BY)
//   bank = (y mod BY) * AX + ((x - n*BX) mod AX)
//   addr = n * ceil(IMG_W / AX) + x / AX
// Within one image row a module owns exactly one pixel in every AX columns,
// and each module sees each band only in its own row, so the address is
// unique per module and each module holds ceil(IMG_H/BY)*ceil(IMG_W/AX) words;
// the modules together hold the image once.
//
// The lattice form and module count follow the published periodic allocation
// (p and p + s*A + t*B share a module; K = |Ax*By - Ay*Bx|). The module
// numbering and the word-address formula are this design's own choice: the
// method only requires that the module be a simple function of (x, y).
//
// Purely combinational. The divisions and remainders are by constants.
module periodic_addr #(
  parameter int unsigned AX    = 17,
  parameter int unsigned BX    = 4,
  parameter int unsigned BY    = 1,
  parameter int unsigned IMG_W = 500,
  parameter int unsigned IMG_H = 500,
  localparam int unsigned K     = AX * BY,
  localparam int unsigned WPR   = (IMG_W + AX - 1) / AX,
  localparam int unsigned DEPTH = ((IMG_H + BY - 1) / BY) * WPR,
  localparam int unsigned XW    = $clog2(IMG_W),
  localparam int unsigned YW    = $clog2(IMG_H),
  localparam int unsigned KW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  output logic [KW-1:0] bank,
  output logic [AW-1:0] addr
);

  always_comb begin
    int unsigned n, ry, sh, rx;
    n    = 32'(y) / BY;
    ry   = 32'(y) % BY;
    sh   = (n * BX) % AX;
    rx   = ((32'(x) % AX) + AX - sh) % AX;
    bank = KW'(ry * AX + rx);
    addr = AW'(n * WPR + 32'(x) / AX);
  end

endmodule
