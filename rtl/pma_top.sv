// Top level: the two window-parallel matching processors built on periodic
// memory allocation, side by side.
//
//   st_* : multi-resolution stereo matcher (Q = 4, sampling periods 8..1,
//          17 memory modules per image, vector pair A = (17,0), B = (4,1)).
//   of_* : optical-flow block matcher (10 x 10 windows, 10 x 10 search area,
//          10 memory modules per image, diagonal allocation A = (10,0),
//          B = (1,1)).
//
// The two share only clock and reset. Each has its own pixel load port
// (ld_sel 0: reference image, 1: candidate image) and its own start/done
// handshake; see stereo_processor and optical_flow_processor for timing.
// The image size is a parameter so that smaller instances can be simulated;
// the default is the 500 x 500 size of the evaluated processors.
module pma_top
  import pma_pkg::*;
#(
  parameter int unsigned IMG_W = 500,
  parameter int unsigned IMG_H = 500,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  // stereo matcher
  input  logic          st_ld_en,
  input  logic          st_ld_sel,
  input  logic [XW-1:0] st_ld_x,
  input  logic [YW-1:0] st_ld_y,
  input  pixel_t        st_ld_data,
  input  logic          st_start,
  input  logic [XW-1:0] st_ref_x,
  input  logic [YW-1:0] st_ref_y,
  output logic          st_ready,
  output logic          st_done,
  output logic [5:0]    st_disparity,
  output logic [12:0]   st_best_sad,
  output logic          st_level_start,
  output logic [3:0]    st_cur_sp,
  output logic          st_cand_issue,
  // optical-flow matcher
  input  logic          of_ld_en,
  input  logic          of_ld_sel,
  input  logic [XW-1:0] of_ld_x,
  input  logic [YW-1:0] of_ld_y,
  input  pixel_t        of_ld_data,
  input  logic          of_start,
  input  logic [XW-1:0] of_ref_x,
  input  logic [YW-1:0] of_ref_y,
  output logic          of_ready,
  output logic          of_done,
  output logic signed [4:0] of_mv_u,
  output logic signed [4:0] of_mv_v,
  output logic [14:0]   of_best_sad,
  output logic          of_ev_fill,
  output logic          of_ev_down,
  output logic          of_ev_up,
  output logic          of_ev_right
);

  stereo_processor #(
    .Q(4), .SP_MAX(8), .AX(17), .BX(4), .BY(1), .IMG_W(IMG_W), .IMG_H(IMG_H), .D_MAX(63)
  ) u_stereo (
    .clk(clk), .rst_n(rst_n),
    .ld_en(st_ld_en), .ld_sel(st_ld_sel), .ld_x(st_ld_x), .ld_y(st_ld_y), .ld_data(st_ld_data),
    .start(st_start), .ref_x(st_ref_x), .ref_y(st_ref_y),
    .ready(st_ready), .done(st_done), .disparity(st_disparity), .best_sad(st_best_sad),
    .level_start(st_level_start), .cur_sp(st_cur_sp), .cand_issue(st_cand_issue)
  );

  optical_flow_processor #(
    .E(10), .SR(10), .AX(10), .BX(1), .BY(1), .IMG_W(IMG_W), .IMG_H(IMG_H)
  ) u_oflow (
    .clk(clk), .rst_n(rst_n),
    .ld_en(of_ld_en), .ld_sel(of_ld_sel), .ld_x(of_ld_x), .ld_y(of_ld_y), .ld_data(of_ld_data),
    .start(of_start), .ref_x(of_ref_x), .ref_y(of_ref_y),
    .ready(of_ready), .done(of_done), .mv_u(of_mv_u), .mv_v(of_mv_v), .best_sad(of_best_sad),
    .ev_fill(of_ev_fill), .ev_down(of_ev_down), .ev_up(of_ev_up), .ev_right(of_ev_right)
  );

endmodule
