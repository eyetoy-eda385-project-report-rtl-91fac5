// vga_timing: raster counters and sync generation for the VGA output.
//
// A horizontal counter runs 0..H_TOTAL-1 at the 25 MHz pixel clock and a
// vertical counter advances once per line, 0..V_TOTAL-1.  The defaults are
// 800 x 525 clocks, the same line and frame totals that are programmed into
// the camera, with a 640 x 480 visible area.  Sync pulses are active low and
// placed after a front porch (16 clocks / 10 lines, sync 96 clocks / 2
// lines), the usual 640x480@60 Hz placement; that placement and the
// polarity are this design's choice.
//
// Timing: all outputs are registered and describe the same pixel:
// hcount/vcount are the position, video_on is high inside the visible area,
// hsync_n/vsync_n are the syncs for that position.  line_start pulses for
// the pixel with hcount==0, frame_start for hcount==0 and vcount==0.
module vga_timing
  import eyetoy_pkg::*;
#(
  parameter int unsigned H_ACTIVE = ACT_W,
  parameter int unsigned H_TOTAL  = FRAME_W,
  parameter int unsigned H_FRONT  = H_FP,
  parameter int unsigned H_SYNC   = H_SW,
  parameter int unsigned V_ACTIVE = ACT_H,
  parameter int unsigned V_TOTAL  = FRAME_H,
  parameter int unsigned V_FRONT  = V_FP,
  parameter int unsigned V_SYNC   = V_SW,
  localparam int unsigned HW = $clog2(H_TOTAL),
  localparam int unsigned VW = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          video_on,
  output logic          line_start,
  output logic          frame_start
);

  localparam int unsigned HS_BEG = H_ACTIVE + H_FRONT;
  localparam int unsigned HS_END = HS_BEG + H_SYNC;
  localparam int unsigned VS_BEG = V_ACTIVE + V_FRONT;
  localparam int unsigned VS_END = VS_BEG + V_SYNC;

  logic [HW-1:0] h_nxt;
  logic [VW-1:0] v_nxt;

  always_comb begin
    h_nxt = hcount;
    v_nxt = vcount;
    if (hcount == HW'(H_TOTAL - 1)) begin
      h_nxt = '0;
      v_nxt = (vcount == VW'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      h_nxt = hcount + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount      <= '0;
      vcount      <= '0;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      video_on    <= 1'b1;
      line_start  <= 1'b1;
      frame_start <= 1'b1;
    end else begin
      hcount      <= h_nxt;
      vcount      <= v_nxt;
      hsync_n     <= !(h_nxt >= HW'(HS_BEG) && h_nxt < HW'(HS_END));
      vsync_n     <= !(v_nxt >= VW'(VS_BEG) && v_nxt < VW'(VS_END));
      video_on    <= (h_nxt < HW'(H_ACTIVE)) && (v_nxt < VW'(V_ACTIVE));
      line_start  <= (h_nxt == '0);
      frame_start <= (h_nxt == '0) && (v_nxt == '0);
    end
  end

endmodule
