// Multi-resolution stereo-matching processor.
//
// For one reference pixel (ref_x, ref_y) of the reference image it finds the
// horizontal disparity d whose Q x Q candidate window in the candidate image
// has the smallest sum of absolute differences (SAD). Windows are sampled:
// at sampling period SP the window pixels are (x + SP*c, y + SP*r), r,c in
// 0..Q-1. The search runs coarse to fine, SP = SP_MAX down to 1:
//   level SP_MAX : d = 0, SP_MAX, 2*SP_MAX, ... <= D_MAX
//   level SP     : every d in [d_best - SP, d_best + SP], clipped to
//                  [0, D_MAX], around the best d of the level before.
// The disparity of level SP = 1 is the result.
//
// Both images are stored in their own window_memory (K = AX*BY modules)
// under the same periodic allocation. The default vector pair A = (17,0),
// B = (4,1) gives 17 modules and lets the 16 pixels of the window be read
// in one cycle at every sampling period 1..8; one module is idle on each
// read. Each module feeds its own absolute-difference unit; the unit picks
// the reference pixel that matches the window pixel its module holds. A
// 17-input adder tree forms the SAD.
//
// Timing, per level: one cycle reads the reference window into registers,
// then one candidate window is read per cycle, then 3 cycles drain the
// pipeline so the level's best disparity is known before the next level
// starts. A search therefore takes sum over levels of (candidates + 4)
// cycles from the cycle after 'start' to the 'done' pulse. disparity and
// best_sad are valid with done and held until the next search. 'ready' is
// high when a start is accepted. Images are loaded one pixel per cycle
// (ld_sel 0: reference, 1: candidate) while the processor is idle.
// Reset is synchronous and active low.
//
// Following the published design: the window shape, Q = 4, SP_MAX = 8, 17 modules, 17 AD
// units, 16 adders, 500 x 500 8-bit images, minimum-SAD selection and the
// coarse-to-fine order. This design's own: the refinement range (+/- SP),
// D_MAX = 63, the top-left window anchor, and storing the reference image in
// a second set of modules.
module stereo_processor
  import pma_pkg::*;
#(
  parameter int unsigned Q      = 4,
  parameter int unsigned SP_MAX = 8,
  parameter int unsigned AX     = 17,
  parameter int unsigned BX     = 4,
  parameter int unsigned BY     = 1,
  parameter int unsigned IMG_W  = 500,
  parameter int unsigned IMG_H  = 500,
  parameter int unsigned D_MAX  = 63,
  localparam int unsigned NPIX = Q * Q,
  localparam int unsigned K    = AX * BY,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H),
  localparam int unsigned DW   = $clog2(D_MAX + 1),
  localparam int unsigned SPW  = $clog2(SP_MAX + 1),
  localparam int unsigned SW   = PIX_W + $clog2(K),
  localparam int unsigned IW   = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // image load
  input  logic           ld_en,
  input  logic           ld_sel,
  input  logic [XW-1:0]  ld_x,
  input  logic [YW-1:0]  ld_y,
  input  pixel_t         ld_data,
  // search
  input  logic           start,
  input  logic [XW-1:0]  ref_x,
  input  logic [YW-1:0]  ref_y,
  output logic           ready,
  output logic           done,
  output logic [DW-1:0]  disparity,
  output logic [SW-1:0]  best_sad,
  // status
  output logic           level_start,
  output logic [SPW-1:0] cur_sp,
  output logic           cand_issue
);

  typedef enum logic [1:0] {S_IDLE, S_REF, S_CAND, S_DRAIN} state_e;

  state_e         state;
  logic [SPW-1:0] sp;
  logic [DW-1:0]  d_cur, d_hi, step;
  logic [XW-1:0]  rx;
  logic [YW-1:0]  ry;
  logic           first;

  // ---- window offsets for the current sampling period ---------------------
  logic [XW-1:0] off_x [NPIX];
  logic [YW-1:0] off_y [NPIX];
  always_comb
    for (int unsigned j = 0; j < NPIX; j++) begin
      off_x[j] = XW'(32'(sp) * (j % Q));
      off_y[j] = YW'(32'(sp) * (j / Q));
    end

  // ---- the two image memories ---------------------------------------------
  logic   ref_rd_valid, cand_rd_valid, ref_conflict, cand_conflict;
  pixel_t ref_bank_data [K];
  logic [IW-1:0] ref_bank_idx [K];
  logic   ref_bank_used [K];
  pixel_t ref_win [NPIX];
  pixel_t cand_bank_data [K];
  logic [IW-1:0] cand_bank_idx [K];
  logic   cand_bank_used [K];
  pixel_t cand_win [NPIX];

  window_memory #(.AX(AX), .BX(BX), .BY(BY), .IMG_W(IMG_W), .IMG_H(IMG_H), .NPIX(NPIX)) u_ref_mem (
    .clk(clk), .rst_n(rst_n),
    .wr_en(ld_en && !ld_sel), .wr_x(ld_x), .wr_y(ld_y), .wr_data(ld_data),
    .rd_en(state == S_REF), .org_x(rx), .org_y(ry), .off_x(off_x), .off_y(off_y),
    .conflict(ref_conflict), .rd_valid(ref_rd_valid),
    .bank_data(ref_bank_data), .bank_idx(ref_bank_idx), .bank_used(ref_bank_used),
    .win_data(ref_win)
  );

  window_memory #(.AX(AX), .BX(BX), .BY(BY), .IMG_W(IMG_W), .IMG_H(IMG_H), .NPIX(NPIX)) u_cand_mem (
    .clk(clk), .rst_n(rst_n),
    .wr_en(ld_en && ld_sel), .wr_x(ld_x), .wr_y(ld_y), .wr_data(ld_data),
    .rd_en(state == S_CAND), .org_x(rx + XW'(d_cur)), .org_y(ry), .off_x(off_x), .off_y(off_y),
    .conflict(cand_conflict), .rd_valid(cand_rd_valid),
    .bank_data(cand_bank_data), .bank_idx(cand_bank_idx), .bank_used(cand_bank_used),
    .win_data(cand_win)
  );

  // reference window registers, in window order
  pixel_t ref_reg [NPIX];
  always_ff @(posedge clk)
    if (ref_rd_valid)
      for (int unsigned j = 0; j < NPIX; j++) ref_reg[j] <= ref_win[j];

  // ---- one AD unit per module, adder tree ---------------------------------
  pixel_t        ad_out [K];
  logic [SW-1:0] sad;
  for (genvar k = 0; k < K; k++) begin : g_pe
    ad_unit u_ad (
      .a(ref_reg[cand_bank_idx[k]]), .b(cand_bank_data[k]), .en(cand_bank_used[k]), .d(ad_out[k])
    );
  end
  adder_tree #(.N(K), .IW(PIX_W)) u_tree (.in(ad_out), .sum(sad));

  // ---- pipeline: issue -> data/SAD (p1) -> registered SAD (p2) -> min -----
  logic          p1_valid, p1_first, p2_valid, p2_first;
  logic [DW-1:0] p1_tag, p2_tag, best_tag;
  logic [SW-1:0] sad_q, best_sad_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p1_valid <= 1'b0;
      p2_valid <= 1'b0;
    end else begin
      p1_valid <= (state == S_CAND);
      p2_valid <= p1_valid;
    end
    p1_first <= first;
    p1_tag   <= d_cur;
    p2_first <= p1_first;
    p2_tag   <= p1_tag;
    sad_q    <= sad;
  end

  min_select #(.SW(SW), .TW(DW)) u_min (
    .clk(clk), .rst_n(rst_n), .in_valid(p2_valid), .in_first(p2_first),
    .in_sad(sad_q), .in_tag(p2_tag), .best_sad(best_sad_i), .best_tag(best_tag)
  );

  // ---- control -------------------------------------------------------------
  logic [SPW-1:0] sp_n;
  logic [DW:0]    lo_n, hi_n;
  always_comb begin
    sp_n = sp - 1'b1;
    lo_n = (best_tag > DW'(sp_n)) ? {1'b0, best_tag} - (DW+1)'(sp_n) : '0;
    hi_n = {1'b0, best_tag} + (DW+1)'(sp_n);
    if (hi_n > (DW+1)'(D_MAX)) hi_n = (DW+1)'(D_MAX);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sp        <= '0;
      d_cur     <= '0;
      d_hi      <= '0;
      step      <= '0;
      rx        <= '0;
      ry        <= '0;
      first     <= 1'b0;
      done      <= 1'b0;
      disparity <= '0;
      best_sad  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rx    <= ref_x;
          ry    <= ref_y;
          sp    <= SPW'(SP_MAX);
          d_cur <= '0;
          d_hi  <= DW'(D_MAX);
          step  <= DW'(SP_MAX);
          state <= S_REF;
        end
        S_REF: begin
          first <= 1'b1;
          state <= S_CAND;
        end
        S_CAND: begin
          first <= 1'b0;
          if ({1'b0, d_cur} + {1'b0, step} > {1'b0, d_hi}) state <= S_DRAIN;
          else d_cur <= d_cur + step;
        end
        S_DRAIN: if (!p1_valid && !p2_valid) begin
          if (sp == SPW'(1)) begin
            done      <= 1'b1;
            disparity <= best_tag;
            best_sad  <= best_sad_i;
            state     <= S_IDLE;
          end else begin
            sp    <= sp_n;
            d_cur <= DW'(lo_n);
            d_hi  <= DW'(hi_n);
            step  <= DW'(1);
            state <= S_REF;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready       = (state == S_IDLE);
  assign level_start = (state == S_REF);
  assign cur_sp      = sp;
  assign cand_issue  = (state == S_CAND);

  a_start_in_image : assert property (@(posedge clk) disable iff (!rst_n)
      (start && ready) |-> (32'(ref_x) + D_MAX + (Q - 1) * SP_MAX < IMG_W &&
                            32'(ref_y) + (Q - 1) * SP_MAX < IMG_H))
    else $error("stereo_processor: search would leave the image");
  a_load_idle : assert property (@(posedge clk) disable iff (!rst_n) ld_en |-> ready)
    else $error("stereo_processor: image load while searching");

endmodule
