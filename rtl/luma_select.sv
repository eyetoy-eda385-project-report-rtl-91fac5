// luma_select: keeps the luminance (Y) bytes of the camera's 8-bit YCbCr
// byte stream and drops the chroma bytes.
//
// The camera sends one byte per pixel clock in the repeating 4:2:2 order
// Cb, Y, Cr, Y, so every second byte is a Y byte.  Because the camera's own
// sync and pixel-clock outputs are not used, the byte phase is taken from
// the display raster: the byte present in the cycle where line_start is
// high is byte 0 of a pair, and Y is the byte with index Y_PHASE (default 1).
// Showing only Y turns the colour picture into a clean grey-scale one.
//
// Timing: y is registered; it is updated one clock after a Y byte is seen
// and holds its value across the following chroma byte, so each Y value is
// shown for two display pixels.  y_valid pulses with each update.
module luma_select #(
  parameter bit Y_PHASE = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       line_start,
  input  logic [7:0] cam_data,
  output logic [7:0] y,
  output logic       y_valid
);

  logic phase_q;
  logic phase_cur;

  assign phase_cur = line_start ? 1'b0 : phase_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      phase_q <= !phase_cur;
      y_valid <= (phase_cur == Y_PHASE);
      if (phase_cur == Y_PHASE) y <= cam_data;
    end
  end

endmodule
