// img_proc: the player-extraction chain, three proc_stage blocks in a row.
//
//   camera Y -> [threshold] -> [erode SE] -> [dilate SE] -> binary mask
//
// Thresholding gives a binary foreground mask; erosion followed by dilation
// with the same rectangle (a morphological opening) removes foreground specks
// smaller than the structuring element and restores the shape of larger
// regions.  OP2/OP3 can be swapped to get a closing instead.  The choice of
// an opening as the default chain is this design's.
//
// Clocks: pixels are written in cam_clk's domain, all cores run on
// proc_clk, and the mask is read in out_clk's domain.  Between two stages a
// link in proc_clk moves a word whenever the upstream output FIFO has one
// and the downstream input FIFO has room.  Each domain has its own
// synchronous reset (apply all three together); a reset starts a frame.
// The producer must respect in_full; the mask is read with out_rd_en while
// out_empty is low, one byte (00 or FF) per pixel in raster order.
module img_proc
  import eyetoy_pkg::*;
#(
  parameter int unsigned IMG_W   = 640,
  parameter int unsigned IMG_H   = 480,
  parameter int unsigned SE_W    = 3,
  parameter int unsigned SE_H    = 3,
  parameter int unsigned FIFO_AW = 4,
  parameter proc_op_e    OP2     = OP_ERODE,
  parameter proc_op_e    OP3     = OP_DILATE
) (
  input  logic       cam_clk,
  input  logic       cam_rst,
  input  logic       in_wr_en,
  input  logic [7:0] in_data,
  output logic       in_full,

  input  logic       proc_clk,
  input  logic       proc_rst,
  input  logic [7:0] threshold,
  input  logic       bg_bright,

  input  logic       out_clk,
  input  logic       out_rst,
  input  logic       out_rd_en,
  output logic [7:0] out_data,
  output logic       out_empty
);

  localparam int unsigned NST = 3;

  logic [7:0] s_out_data [NST];
  logic       s_out_empty[NST];
  logic       s_out_rd   [NST-1];
  logic       s_in_full  [NST];

  proc_stage #(
    .OP(OP_THRESHOLD), .IMG_W(IMG_W), .IMG_H(IMG_H),
    .SE_W(SE_W), .SE_H(SE_H), .FIFO_AW(FIFO_AW)
  ) u_s0 (
    .in_clk(cam_clk), .in_rst(cam_rst), .in_wr_en(in_wr_en), .in_data(in_data), .in_full(s_in_full[0]),
    .proc_clk(proc_clk), .proc_rst(proc_rst), .threshold(threshold), .bg_bright(bg_bright),
    .out_clk(proc_clk), .out_rst(proc_rst), .out_rd_en(s_out_rd[0]),
    .out_data(s_out_data[0]), .out_empty(s_out_empty[0])
  );

  proc_stage #(
    .OP(OP2), .IMG_W(IMG_W), .IMG_H(IMG_H),
    .SE_W(SE_W), .SE_H(SE_H), .FIFO_AW(FIFO_AW)
  ) u_s1 (
    .in_clk(proc_clk), .in_rst(proc_rst), .in_wr_en(s_out_rd[0]), .in_data(s_out_data[0]), .in_full(s_in_full[1]),
    .proc_clk(proc_clk), .proc_rst(proc_rst), .threshold(threshold), .bg_bright(bg_bright),
    .out_clk(proc_clk), .out_rst(proc_rst), .out_rd_en(s_out_rd[1]),
    .out_data(s_out_data[1]), .out_empty(s_out_empty[1])
  );

  proc_stage #(
    .OP(OP3), .IMG_W(IMG_W), .IMG_H(IMG_H),
    .SE_W(SE_W), .SE_H(SE_H), .FIFO_AW(FIFO_AW)
  ) u_s2 (
    .in_clk(proc_clk), .in_rst(proc_rst), .in_wr_en(s_out_rd[1]), .in_data(s_out_data[1]), .in_full(s_in_full[2]),
    .proc_clk(proc_clk), .proc_rst(proc_rst), .threshold(threshold), .bg_bright(bg_bright),
    .out_clk(out_clk), .out_rst(out_rst), .out_rd_en(out_rd_en),
    .out_data(s_out_data[2]), .out_empty(s_out_empty[2])
  );

  // links between stages (proc_clk domain)
  assign s_out_rd[0] = !s_out_empty[0] && !s_in_full[1];
  assign s_out_rd[1] = !s_out_empty[1] && !s_in_full[2];

  assign in_full   = s_in_full[0];
  assign out_data  = s_out_data[2];
  assign out_empty = s_out_empty[2];

endmodule
