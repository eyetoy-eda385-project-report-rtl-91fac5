// morph_rect: on-the-fly binary erosion or dilation with a flat rectangular
// structuring element of SE_W x SE_H pixels, for a raster of IMG_W x IMG_H
// pixels arriving row by row.
//
// How it works.  Erosion of a rectangle splits into a column part and a row
// part.  For every image column a small counter, kept in a line memory of
// IMG_W entries, holds how many consecutive 1-pixels end at the current row
// in that column, saturating at SE_H.  A column "passes" when its counter is
// SE_H.  A single counter then holds how many consecutive passing columns end
// at the current column, saturating at SE_W; the output pixel is 1 when it
// reaches SE_W.  Storage is IMG_W * clog2(SE_H+1) bits instead of SE_H full
// lines.  Dilation uses the duality dilate(f) = not erode(not f): with
// DILATE = 1 the input and output bits are inverted around the same logic.
//
// Window and borders (this design's choice): the output for pixel (r, c)
// covers rows r-SE_H+1..r and columns c-SE_W+1..c, i.e. the window ends at
// the current pixel, so no look-ahead is needed.  Positions above or left of
// the image count as 1 for erosion and as 0 for dilation, so edges are
// neither eaten away nor grown in.
//
// Interface and timing.  The core sits between two FIFOs.  It takes the
// head of the input FIFO (show-ahead) whenever that FIFO is not empty and
// the output FIFO is not full, and in the same clock writes the result:
// in_rd_en and out_wr_en are the same signal.  When either side is not
// ready, the core simply waits with its counters frozen, so an intermittent
// pixel flow stops the whole chain without losing position.  Pixels are
// bytes; any non-zero byte is a 1, and the output is 8'hFF or 8'h00.
// Row and column counters are cleared by rst, which therefore marks the
// start of a frame.
module morph_rect #(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned IMG_H  = 480,
  parameter int unsigned SE_W   = 3,
  parameter int unsigned SE_H   = 3,
  parameter bit          DILATE = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] in_data,
  input  logic       in_empty,
  output logic       in_rd_en,
  output logic [7:0] out_data,
  output logic       out_wr_en,
  input  logic       out_full
);

  localparam int unsigned CW = $clog2(IMG_W);
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned VC = $clog2(SE_H + 1);
  localparam int unsigned HC = $clog2(SE_W + 1);

  logic [VC-1:0] vmem [IMG_W];   // per-column run length
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic [HC-1:0] hcnt;           // run of passing columns

  logic          fire;
  logic          b_in;
  logic [VC-1:0] v_prev, v_new;
  logic [HC-1:0] h_prev, h_new;
  logic          col_ok;
  logic          b_out;

  assign fire = !in_empty && !out_full;

  always_comb begin
    b_in   = (in_data != 8'h00) ^ DILATE;
    v_prev = (row == '0) ? VC'(SE_H) : vmem[col];
    if (!b_in)                    v_new = '0;
    else if (v_prev >= VC'(SE_H)) v_new = VC'(SE_H);
    else                          v_new = v_prev + 1'b1;
    col_ok = (v_new == VC'(SE_H));
    h_prev = (col == '0) ? HC'(SE_W) : hcnt;
    if (!col_ok)                  h_new = '0;
    else if (h_prev >= HC'(SE_W)) h_new = HC'(SE_W);
    else                          h_new = h_prev + 1'b1;
    b_out  = (h_new == HC'(SE_W)) ^ DILATE;
  end

  assign in_rd_en  = fire;
  assign out_wr_en = fire;
  assign out_data  = {8{b_out}};

  always_ff @(posedge clk) begin
    if (fire) vmem[col] <= v_new;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      col  <= '0;
      row  <= '0;
      hcnt <= '0;
    end else if (fire) begin
      hcnt <= h_new;
      if (col == CW'(IMG_W - 1)) begin
        col <= '0;
        row <= (row == RW'(IMG_H - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
