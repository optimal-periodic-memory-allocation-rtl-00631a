// Window memory: K single-port memory modules under a periodic allocation,
// giving conflict-free parallel access to every pixel of a window.
//
// Each pixel of the image lives in the module chosen by periodic_addr. To read
// a window, the caller gives its origin (org_x, org_y) and the offsets of its
// NPIX pixels; every offset gets its own address generator, and each module
// takes the address of the one window pixel that falls in it. When the period
// vectors satisfy the parallel-access condition for this window shape, no two
// pixels of the window share a module, so the whole window is read in one
// cycle. An assertion checks that condition on every read; the same fact is
// also given on the 'conflict' output.
//
// Timing: a read issued with rd_en in cycle t returns in cycle t+1 with
// rd_valid high. The data are given two ways:
//   bank_data/bank_idx/bank_used : per module, the pixel it read and which
//     window pixel that is (the view of the processing element tied to the
//     module; modules the window does not touch have bank_used low);
//   win_data : the same pixels put back in window order.
// Loading: wr_en writes one pixel (wr_x, wr_y) per cycle. A module is single
// ported, so a read and a write may not be issued in the same cycle.
//
// The published method gives the module count, the one-module-per-PE structure and the
// parallel-access condition; the per-offset address generators, the window
// order output and the load port are this design's own choices.
module window_memory
  import pma_pkg::*;
#(
  parameter int unsigned AX    = 17,
  parameter int unsigned BX    = 4,
  parameter int unsigned BY    = 1,
  parameter int unsigned IMG_W = 500,
  parameter int unsigned IMG_H = 500,
  parameter int unsigned NPIX  = 16,
  localparam int unsigned K     = AX * BY,
  localparam int unsigned WPR   = (IMG_W + AX - 1) / AX,
  localparam int unsigned DEPTH = ((IMG_H + BY - 1) / BY) * WPR,
  localparam int unsigned XW    = $clog2(IMG_W),
  localparam int unsigned YW    = $clog2(IMG_H),
  localparam int unsigned KW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned IW    = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // pixel load port
  input  logic          wr_en,
  input  logic [XW-1:0] wr_x,
  input  logic [YW-1:0] wr_y,
  input  pixel_t        wr_data,
  // parallel window read
  input  logic          rd_en,
  input  logic [XW-1:0] org_x,
  input  logic [YW-1:0] org_y,
  input  logic [XW-1:0] off_x [NPIX],
  input  logic [YW-1:0] off_y [NPIX],
  output logic          conflict,
  output logic          rd_valid,
  output pixel_t        bank_data [K],
  output logic [IW-1:0] bank_idx  [K],
  output logic          bank_used [K],
  output pixel_t        win_data  [NPIX]
);

  // ---- address generation, one generator per window pixel ----------------
  logic [XW-1:0] px [NPIX];
  logic [YW-1:0] py [NPIX];
  logic [KW-1:0] pbank [NPIX];
  logic [AW-1:0] paddr [NPIX];
  logic          in_image;

  for (genvar j = 0; j < NPIX; j++) begin : g_pix
    assign px[j] = org_x + off_x[j];
    assign py[j] = org_y + off_y[j];
    periodic_addr #(.AX(AX), .BX(BX), .BY(BY), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_addr (
      .x(px[j]), .y(py[j]), .bank(pbank[j]), .addr(paddr[j])
    );
  end

  always_comb begin
    in_image = 1'b1;
    for (int unsigned j = 0; j < NPIX; j++)
      if (32'(org_x) + 32'(off_x[j]) >= IMG_W || 32'(org_y) + 32'(off_y[j]) >= IMG_H)
        in_image = 1'b0;
  end

  logic [KW-1:0] wbank;
  logic [AW-1:0] waddr;
  periodic_addr #(.AX(AX), .BX(BX), .BY(BY), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_waddr (
    .x(wr_x), .y(wr_y), .bank(wbank), .addr(waddr)
  );

  // ---- each module picks the window pixel that falls in it ---------------
  logic [AW-1:0] raddr [K];
  logic [IW-1:0] ridx  [K];
  logic          rused [K];

  always_comb begin
    conflict = 1'b0;
    for (int unsigned k = 0; k < K; k++) begin
      raddr[k] = '0;
      ridx[k]  = '0;
      rused[k] = 1'b0;
      for (int unsigned j = 0; j < NPIX; j++) begin
        if (32'(pbank[j]) == k) begin
          if (rused[k]) conflict = 1'b1;
          raddr[k] = paddr[j];
          ridx[k]  = IW'(j);
          rused[k] = 1'b1;
        end
      end
    end
  end

  // ---- the memory modules -------------------------------------------------
  for (genvar k = 0; k < K; k++) begin : g_mod
    logic          en;
    logic [AW-1:0] addr;
    assign en   = wr_en ? (32'(wbank) == k) : (rd_en && rused[k]);
    assign addr = wr_en ? waddr : raddr[k];
    mem_module #(.DEPTH(DEPTH), .DW(PIX_W)) u_mem (
      .clk(clk), .en(en), .we(wr_en), .addr(addr), .wdata(wr_data), .rdata(bank_data[k])
    );
  end

  // ---- read bookkeeping, aligned with the read data ----------------------
  logic [KW-1:0] pbank_q [NPIX];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      for (int unsigned k = 0; k < K; k++) begin
        bank_idx[k]  <= '0;
        bank_used[k] <= 1'b0;
      end
      for (int unsigned j = 0; j < NPIX; j++) pbank_q[j] <= '0;
    end else begin
      rd_valid <= rd_en && !wr_en;
      if (rd_en && !wr_en) begin
        for (int unsigned k = 0; k < K; k++) begin
          bank_idx[k]  <= ridx[k];
          bank_used[k] <= rused[k];
        end
        for (int unsigned j = 0; j < NPIX; j++) pbank_q[j] <= pbank[j];
      end
    end
  end

  always_comb
    for (int unsigned j = 0; j < NPIX; j++) win_data[j] = bank_data[pbank_q[j]];

  // ---- access rules -------------------------------------------------------
  a_no_conflict : assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !conflict)
    else $error("window_memory: two window pixels fall in the same module");
  a_single_port : assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && wr_en))
    else $error("window_memory: read and write in the same cycle");
  a_in_image    : assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> in_image)
    else $error("window_memory: window outside the image");

endmodule
