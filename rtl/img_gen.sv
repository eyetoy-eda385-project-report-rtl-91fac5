// img_gen: image generation for the game screen.
//
// For every visible pixel it decides whether the "wall" covers that screen
// position.  The wall fills the screen except for a hole made of N_HOLES
// rectangles; inside the hole the camera picture is shown, so the player
// sees themselves through the cut-out.  The camera picture is grey-scale:
// the luminance byte y is put on all three colour channels (its top bits,
// since the VGA DAC has R_W/G_W/B_W bits per channel).  Wall pixels get the
// constant WALL_COLOR; outside the visible area all channels are 0.
// wall_en = 0 shows the plain camera picture with no wall.
//
// The default hole is a figure with head, outstretched arms and body, in the
// spirit of a player-shaped cut-out; its coordinates, the red wall colour
// and the 3-3-2 colour widths are this design's choice.
//
// Timing: hcount, vcount, video_on and y must describe the same pixel; the
// colour outputs are registered, one clock later.
module img_gen
  import eyetoy_pkg::*;
#(
  parameter int unsigned HW      = 10,
  parameter int unsigned VW      = 10,
  parameter int unsigned R_W     = 3,
  parameter int unsigned G_W     = 3,
  parameter int unsigned B_W     = 2,
  parameter int unsigned N_HOLES = 3,
  parameter rect_t [N_HOLES-1:0] HOLES = {
    // {x0, x1, y0, y1}
    rect_t'{10'd240, 10'd399, 10'd240, 10'd479},   // body
    rect_t'{10'd150, 10'd489, 10'd240, 10'd279},   // arms
    rect_t'{10'd280, 10'd359, 10'd150, 10'd239}    // head
  },
  parameter logic [R_W+G_W+B_W-1:0] WALL_COLOR = {{R_W{1'b1}}, {G_W{1'b0}}, {B_W{1'b0}}}
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           wall_en,
  input  logic [HW-1:0]  hcount,
  input  logic [VW-1:0]  vcount,
  input  logic           video_on,
  input  logic [7:0]     y,
  output logic [R_W-1:0] red,
  output logic [G_W-1:0] green,
  output logic [B_W-1:0] blue,
  output logic           is_wall
);

  logic in_hole;
  logic wall_px;

  always_comb begin
    in_hole = 1'b0;
    for (int i = 0; i < int'(N_HOLES); i++) begin
      if (32'(hcount) >= 32'(HOLES[i].x0) && 32'(hcount) <= 32'(HOLES[i].x1) &&
          32'(vcount) >= 32'(HOLES[i].y0) && 32'(vcount) <= 32'(HOLES[i].y1))
        in_hole = 1'b1;
    end
    wall_px = wall_en && !in_hole;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      red     <= '0;
      green   <= '0;
      blue    <= '0;
      is_wall <= 1'b0;
    end else if (!video_on) begin
      red     <= '0;
      green   <= '0;
      blue    <= '0;
      is_wall <= 1'b0;
    end else if (wall_px) begin
      {red, green, blue} <= WALL_COLOR;
      is_wall            <= 1'b1;
    end else begin
      red     <= y[7 -: R_W];
      green   <= y[7 -: G_W];
      blue    <= y[7 -: B_W];
      is_wall <= 1'b0;
    end
  end

endmodule
