// Optical-flow (block-matching) processor with the diagonal allocation.
//
// For an E x E reference window with top-left (ref_x, ref_y) in the image at
// time T, it finds the motion vector (u, v), u,v in [-SR/2, SR/2-1], whose
// candidate window at (ref_x+u, ref_y+v) in the image at time T+dT has the
// smallest SAD. All SR*SR candidates are visited in a square-wave order:
// down column u = -SR/2, one step right, up the next column, and so on.
//
// Pixel reuse: the candidate window sits in an E x E register array
// (window_regs). A vertical step needs only the new row (an E x 1 window)
// and a horizontal step only the new column (a 1 x E window). Under the
// diagonal allocation A = (10,0), B = (1,1) (module = (x - y) mod 10) both
// line shapes fall in 10 different modules, so each step is one parallel
// read from 10 modules. The first window is built by E row reads, during
// which the reference window is read row by row from a second memory with
// the same allocation. E*E AD units and an adder tree of E*E-1 adders give
// the SAD of the whole window each cycle.
//
// Timing: after 'start' is taken, the processor reads one line per cycle
// for exactly E + SR*SR - 1 cycles (109 for E = SR = 10), then takes the next
// start in the cycle after its last read, or in that same cycle if 'start'
// is already high ('ready'). The result (mv_u, mv_v, best_sad) comes with a
// one-cycle 'done' pulse 4 cycles after the last read, and is held until the
// next 'done'. Images are loaded one pixel per cycle (ld_sel 0: reference
// image at T, 1: candidate image at T+dT) while the processor is idle.
// Reset is synchronous and active low.
//
// Following the published design: E = 10, a 10 x 10 search area, the square-wave order, row
// and column windows, the diagonal allocation with 10 modules, 100 AD units
// and 99 adders, 500 x 500 8-bit images. This design's own: the column-first
// direction of the square wave, the candidate range [-SR/2, SR/2-1], loading
// the reference window from a second memory during the first fill, and the
// pipeline depth.
module optical_flow_processor
  import pma_pkg::*;
#(
  parameter int unsigned E     = 10,
  parameter int unsigned SR    = 10,
  parameter int unsigned AX    = 10,
  parameter int unsigned BX    = 1,
  parameter int unsigned BY    = 1,
  parameter int unsigned IMG_W = 500,
  parameter int unsigned IMG_H = 500,
  localparam int unsigned K    = AX * BY,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H),
  localparam int unsigned CW   = $clog2(SR),
  localparam int unsigned MW   = CW + 1,
  localparam int unsigned NW   = $clog2(SR * SR + 1),
  localparam int unsigned FW   = $clog2(E),
  localparam int unsigned SW   = PIX_W + $clog2(E * E),
  localparam int unsigned IW   = $clog2(E)
) (
  input  logic                clk,
  input  logic                rst_n,
  // image load
  input  logic                ld_en,
  input  logic                ld_sel,
  input  logic [XW-1:0]       ld_x,
  input  logic [YW-1:0]       ld_y,
  input  pixel_t              ld_data,
  // search
  input  logic                start,
  input  logic [XW-1:0]       ref_x,
  input  logic [YW-1:0]       ref_y,
  output logic                ready,
  output logic                done,
  output logic signed [MW-1:0] mv_u,
  output logic signed [MW-1:0] mv_v,
  output logic [SW-1:0]       best_sad,
  // status: the kind of line read issued this cycle
  output logic                ev_fill,
  output logic                ev_down,
  output logic                ev_up,
  output logic                ev_right
);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_SEARCH} state_e;

  state_e        state;
  logic [XW-1:0] bx, rx;
  logic [YW-1:0] by, ry;
  logic [FW-1:0] k;
  logic [CW-1:0] cu, cv;
  logic          down;
  logic [NW-1:0] cnt;

  // ---- what to read this cycle --------------------------------------------
  logic          issue, tag_valid, first, last, row_read, accept;
  shift_op_e     op;
  logic [XW-1:0] org_x;
  logic [YW-1:0] org_y;
  logic [CW-1:0] cu_n, cv_n;
  logic          down_n;

  always_comb begin
    issue     = 1'b0;
    tag_valid = 1'b0;
    first     = 1'b0;
    last      = 1'b0;
    row_read  = 1'b1;
    op        = SHIFT_HOLD;
    org_x     = bx;
    org_y     = by;
    cu_n      = cu;
    cv_n      = cv;
    down_n    = down;
    ev_fill   = 1'b0;
    ev_down   = 1'b0;
    ev_up     = 1'b0;
    ev_right  = 1'b0;
    unique case (state)
      S_FILL: begin
        issue   = 1'b1;
        ev_fill = 1'b1;
        op      = SHIFT_BOTTOM;
        org_y   = by + YW'(k);
        if (32'(k) == E - 1) begin
          tag_valid = 1'b1;
          first     = 1'b1;
          cu_n      = '0;
          cv_n      = '0;
          down_n    = 1'b1;
          last      = (SR * SR == 1);
        end
      end
      S_SEARCH: begin
        issue     = 1'b1;
        tag_valid = 1'b1;
        if (down && 32'(cv) < SR - 1) begin
          ev_down = 1'b1;
          op      = SHIFT_BOTTOM;
          org_x   = bx + XW'(cu);
          org_y   = by + YW'(cv) + YW'(E);
          cv_n    = cv + 1'b1;
        end else if (!down && cv != '0) begin
          ev_up   = 1'b1;
          op      = SHIFT_TOP;
          org_x   = bx + XW'(cu);
          org_y   = by + YW'(cv) - 1'b1;
          cv_n    = cv - 1'b1;
        end else begin
          ev_right = 1'b1;
          op       = SHIFT_RIGHT;
          row_read = 1'b0;
          org_x    = bx + XW'(cu) + XW'(E);
          org_y    = by + YW'(cv);
          cu_n     = cu + 1'b1;
          down_n   = !down;
        end
        last = (32'(cnt) + 1 == SR * SR);
      end
      default: ;
    endcase
  end

  assign ready  = (state == S_IDLE) || last;
  assign accept = start && ready;

  // ---- line offsets: a row (E x 1) or a column (1 x E) ---------------------
  logic [XW-1:0] off_x [E];
  logic [YW-1:0] off_y [E];
  logic [XW-1:0] zoff_x [E];
  logic [YW-1:0] zoff_y [E];
  always_comb
    for (int unsigned j = 0; j < E; j++) begin
      off_x[j]  = row_read ? XW'(j) : '0;
      off_y[j]  = row_read ? '0 : YW'(j);
      zoff_x[j] = XW'(j);
      zoff_y[j] = '0;
    end

  // ---- the two image memories ---------------------------------------------
  logic   cand_rd_valid, ref_rd_valid, cand_conflict, ref_conflict;
  pixel_t cand_bank_data [K];
  logic [IW-1:0] cand_bank_idx [K];
  logic   cand_bank_used [K];
  pixel_t cand_line [E];
  pixel_t ref_bank_data [K];
  logic [IW-1:0] ref_bank_idx [K];
  logic   ref_bank_used [K];
  pixel_t ref_line [E];

  window_memory #(.AX(AX), .BX(BX), .BY(BY), .IMG_W(IMG_W), .IMG_H(IMG_H), .NPIX(E)) u_cand_mem (
    .clk(clk), .rst_n(rst_n),
    .wr_en(ld_en && ld_sel), .wr_x(ld_x), .wr_y(ld_y), .wr_data(ld_data),
    .rd_en(issue), .org_x(org_x), .org_y(org_y), .off_x(off_x), .off_y(off_y),
    .conflict(cand_conflict), .rd_valid(cand_rd_valid),
    .bank_data(cand_bank_data), .bank_idx(cand_bank_idx), .bank_used(cand_bank_used),
    .win_data(cand_line)
  );

  window_memory #(.AX(AX), .BX(BX), .BY(BY), .IMG_W(IMG_W), .IMG_H(IMG_H), .NPIX(E)) u_ref_mem (
    .clk(clk), .rst_n(rst_n),
    .wr_en(ld_en && !ld_sel), .wr_x(ld_x), .wr_y(ld_y), .wr_data(ld_data),
    .rd_en(state == S_FILL), .org_x(rx), .org_y(ry + YW'(k)), .off_x(zoff_x), .off_y(zoff_y),
    .conflict(ref_conflict), .rd_valid(ref_rd_valid),
    .bank_data(ref_bank_data), .bank_idx(ref_bank_idx), .bank_used(ref_bank_used),
    .win_data(ref_line)
  );

  // ---- window registers -----------------------------------------------------
  shift_op_e op_q;
  pixel_t    cand_win [E][E];
  pixel_t    ref_win  [E][E];

  window_regs #(.E(E)) u_cand_regs (
    .clk(clk), .rst_n(rst_n), .op(cand_rd_valid ? op_q : SHIFT_HOLD), .line(cand_line), .win(cand_win)
  );
  window_regs #(.E(E)) u_ref_regs (
    .clk(clk), .rst_n(rst_n), .op(ref_rd_valid ? SHIFT_BOTTOM : SHIFT_HOLD), .line(ref_line), .win(ref_win)
  );

  // ---- E*E AD units and the adder tree -------------------------------------
  pixel_t        ad_out [E*E];
  logic [SW-1:0] sad;
  for (genvar r = 0; r < E; r++) begin : g_row
    for (genvar c = 0; c < E; c++) begin : g_col
      ad_unit u_ad (.a(ref_win[r][c]), .b(cand_win[r][c]), .en(1'b1), .d(ad_out[r*E+c]));
    end
  end
  adder_tree #(.N(E*E), .IW(PIX_W)) u_tree (.in(ad_out), .sum(sad));

  // ---- pipeline: issue -> line (p1) -> window (p2) -> SAD reg (p3) -> min ---
  logic              p1_v, p2_v, p3_v, p1_f, p2_f, p3_f, p1_l, p2_l, p3_l;
  logic [2*CW-1:0]   p1_t, p2_t, p3_t, best_tag;
  logic [SW-1:0]     sad_q, best_sad_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {p1_v, p2_v, p3_v, done} <= '0;
      op_q <= SHIFT_HOLD;
    end else begin
      p1_v <= issue && tag_valid;
      p2_v <= p1_v;
      p3_v <= p2_v;
      done <= p3_v && p3_l;
      op_q <= op;
    end
    p1_f <= first;  p2_f <= p1_f;  p3_f <= p2_f;
    p1_l <= last;   p2_l <= p1_l;  p3_l <= p2_l;
    p1_t <= {cu_n, cv_n};  p2_t <= p1_t;  p3_t <= p2_t;
    sad_q <= sad;
  end

  min_select #(.SW(SW), .TW(2*CW)) u_min (
    .clk(clk), .rst_n(rst_n), .in_valid(p3_v), .in_first(p3_f),
    .in_sad(sad_q), .in_tag(p3_t), .best_sad(best_sad_i), .best_tag(best_tag)
  );

  assign mv_u     = $signed({1'b0, best_tag[2*CW-1:CW]}) - MW'(SR / 2);
  assign mv_v     = $signed({1'b0, best_tag[CW-1:0]}) - MW'(SR / 2);
  assign best_sad = best_sad_i;

  // ---- control -------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      bx    <= '0;
      by    <= '0;
      rx    <= '0;
      ry    <= '0;
      k     <= '0;
      cu    <= '0;
      cv    <= '0;
      down  <= 1'b1;
      cnt   <= '0;
    end else begin
      if (issue) begin
        cu   <= cu_n;
        cv   <= cv_n;
        down <= down_n;
      end
      unique case (state)
        S_FILL: begin
          k <= k + 1'b1;
          if (32'(k) == E - 1) begin
            cnt   <= NW'(1);
            state <= S_SEARCH;
          end
        end
        S_SEARCH: cnt <= cnt + 1'b1;
        default: ;
      endcase
      if (accept) begin
        rx    <= ref_x;
        ry    <= ref_y;
        bx    <= ref_x - XW'(SR / 2);
        by    <= ref_y - YW'(SR / 2);
        k     <= '0;
        state <= S_FILL;
      end else if (last) begin
        state <= S_IDLE;
      end
    end
  end

  a_start_in_image : assert property (@(posedge clk) disable iff (!rst_n)
      accept |-> (32'(ref_x) >= SR / 2 && 32'(ref_y) >= SR / 2 &&
                  32'(ref_x) + SR / 2 + E <= IMG_W && 32'(ref_y) + SR / 2 + E <= IMG_H))
    else $error("optical_flow_processor: search area leaves the image");
  a_load_idle : assert property (@(posedge clk) disable iff (!rst_n) ld_en |-> (state == S_IDLE))
    else $error("optical_flow_processor: image load while searching");

endmodule
