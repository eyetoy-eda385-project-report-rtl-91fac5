// eyetoy_top: camera game "avoid the wall" - the hardware of the FPGA side.
//
// Two independent parts stand side by side:
//
//  * Display path (vga_ctrl), clocked by the 25 MHz pixel clock.  The camera
//    is fed the same pixel clock and programmed (over I2C, by software on a
//    soft CPU outside this RTL) to the same 800 x 525 line/frame totals as
//    the VGA raster.  Its eight data pins enter on cam_data; the luminance
//    bytes are shown as grey on the VGA outputs, except where the wall
//    covers the screen.  The player sees themselves inside the wall's hole.
//
//  * Player extraction (img_proc): threshold, erosion and dilation stages
//    linked by dual-clock FIFOs, producing a binary player mask.  It is not
//    connected to the display path; its ports are brought out as they are.
//
// Parts outside this RTL: the soft CPU, its AXI bus and I2C master that
// write the camera registers, the camera itself, and the FPGA's output-DDR
// primitive that forwards the pixel clock to the camera's clock pin.
module eyetoy_top
  import eyetoy_pkg::*;
#(
  parameter int unsigned IMG_W   = ACT_W,
  parameter int unsigned IMG_H   = ACT_H,
  parameter int unsigned SE_W    = 3,
  parameter int unsigned SE_H    = 3,
  parameter int unsigned FIFO_AW = 4
) (
  // display path
  input  logic       clk_pix,
  input  logic       rst,
  input  logic [7:0] cam_data,
  input  logic       wall_en,
  output logic       vga_hsync_n,
  output logic       vga_vsync_n,
  output logic [2:0] vga_red,
  output logic [2:0] vga_green,
  output logic [1:0] vga_blue,

  // player extraction
  input  logic       ip_cam_clk,
  input  logic       ip_cam_rst,
  input  logic       ip_wr_en,
  input  logic [7:0] ip_data,
  output logic       ip_full,
  input  logic       ip_proc_clk,
  input  logic       ip_proc_rst,
  input  logic [7:0] ip_threshold,
  input  logic       ip_bg_bright,
  input  logic       ip_out_clk,
  input  logic       ip_out_rst,
  input  logic       ip_rd_en,
  output logic [7:0] ip_out_data,
  output logic       ip_out_empty
);

  localparam int unsigned HW = $clog2(FRAME_W);
  localparam int unsigned VW = $clog2(FRAME_H);

  logic          is_wall_unused;
  logic          video_on_unused;
  logic [HW-1:0] hcount_unused;
  logic [VW-1:0] vcount_unused;

  vga_ctrl u_vga (
    .clk(clk_pix), .rst(rst), .cam_data(cam_data), .wall_en(wall_en),
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n),
    .red(vga_red), .green(vga_green), .blue(vga_blue),
    .is_wall(is_wall_unused), .video_on(video_on_unused),
    .hcount(hcount_unused), .vcount(vcount_unused)
  );

  img_proc #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .SE_W(SE_W), .SE_H(SE_H), .FIFO_AW(FIFO_AW)
  ) u_proc (
    .cam_clk(ip_cam_clk), .cam_rst(ip_cam_rst), .in_wr_en(ip_wr_en), .in_data(ip_data), .in_full(ip_full),
    .proc_clk(ip_proc_clk), .proc_rst(ip_proc_rst), .threshold(ip_threshold), .bg_bright(ip_bg_bright),
    .out_clk(ip_out_clk), .out_rst(ip_out_rst), .out_rd_en(ip_rd_en),
    .out_data(ip_out_data), .out_empty(ip_out_empty)
  );

endmodule
