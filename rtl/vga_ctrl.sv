// vga_ctrl: drives the VGA connector from the camera's data pins.
//
// It combines three parts, all clocked by the 25 MHz pixel clock:
//   vga_timing  - raster counters and hsync/vsync (800 x 525 per frame),
//   luma_select - keeps the Y bytes of the camera's YCbCr byte stream,
//   img_gen     - shows either a wall pixel or the camera's Y as grey.
// The camera's own sync and pixel-clock outputs are not used: the camera is
// clocked from the same pixel clock and its frame size is programmed to the
// same 800 x 525 totals, and the display raster decides where each byte
// lands on the screen.
//
// Timing: the timing signals are delayed so that sync and colour leave the
// block together, two clocks after the raster counters (one clock in
// luma_select, one in img_gen).  hcount/vcount outputs are the raster
// position of the colour currently on the outputs.
module vga_ctrl
  import eyetoy_pkg::*;
#(
  parameter int unsigned H_ACTIVE = ACT_W,
  parameter int unsigned H_TOTAL  = FRAME_W,
  parameter int unsigned V_ACTIVE = ACT_H,
  parameter int unsigned V_TOTAL  = FRAME_H,
  localparam int unsigned HW = $clog2(H_TOTAL),
  localparam int unsigned VW = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [7:0]    cam_data,
  input  logic          wall_en,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic [2:0]    red,
  output logic [2:0]    green,
  output logic [1:0]    blue,
  output logic          is_wall,
  output logic          video_on,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount
);

  // stage 0: raster
  logic [HW-1:0] h0;
  logic [VW-1:0] v0;
  logic          hs0, vs0, on0, ls0, fs0;

  vga_timing #(
    .H_ACTIVE(H_ACTIVE), .H_TOTAL(H_TOTAL),
    .V_ACTIVE(V_ACTIVE), .V_TOTAL(V_TOTAL)
  ) u_timing (
    .clk(clk), .rst(rst),
    .hcount(h0), .vcount(v0), .hsync_n(hs0), .vsync_n(vs0),
    .video_on(on0), .line_start(ls0), .frame_start(fs0)
  );

  // stage 1: luma register, raster delayed to match
  logic [7:0]    y1;
  logic          y1_valid;
  logic [HW-1:0] h1;
  logic [VW-1:0] v1;
  logic          hs1, vs1, on1;

  luma_select u_luma (
    .clk(clk), .rst(rst), .line_start(ls0), .cam_data(cam_data),
    .y(y1), .y_valid(y1_valid)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      h1 <= '0; v1 <= '0; hs1 <= 1'b1; vs1 <= 1'b1; on1 <= 1'b0;
    end else begin
      h1 <= h0; v1 <= v0; hs1 <= hs0; vs1 <= vs0; on1 <= on0;
    end
  end

  // stage 2: colour
  img_gen #(.HW(HW), .VW(VW)) u_gen (
    .clk(clk), .rst(rst), .wall_en(wall_en),
    .hcount(h1), .vcount(v1), .video_on(on1), .y(y1),
    .red(red), .green(green), .blue(blue), .is_wall(is_wall)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      hsync_n <= 1'b1; vsync_n <= 1'b1; video_on <= 1'b0;
      hcount  <= '0;   vcount  <= '0;
    end else begin
      hsync_n <= hs1; vsync_n <= vs1; video_on <= on1;
      hcount  <= h1;  vcount  <= v1;
    end
  end

endmodule
