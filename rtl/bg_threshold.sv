// bg_threshold: background extraction by brightness.
//
// The player stands in front of a background (a wall) that is either
// clearly brighter or clearly darker than they are.  Each luminance value
// is compared with a threshold and the result is one bit per pixel:
// 1 = player (foreground), 0 = background.  With bg_bright = 1 the
// background is the bright part, so pixels darker than the threshold are
// foreground; with bg_bright = 0 it is the other way round.  A pixel equal
// to the threshold counts as background (this design's choice).
//
// There is no memory and no clock: one comparator and a polarity select,
// so pixels are classified at whatever rate they arrive.  fg_byte repeats
// the bit on all eight bits, the form a binary pixel takes on the 8-bit
// bus between processing stages.
module bg_threshold (
  input  logic [7:0] y,
  input  logic [7:0] threshold,
  input  logic       bg_bright,
  output logic       fg,
  output logic [7:0] fg_byte
);

  always_comb begin
    fg      = bg_bright ? (y < threshold) : (y > threshold);
    fg_byte = {8{fg}};
  end

endmodule
