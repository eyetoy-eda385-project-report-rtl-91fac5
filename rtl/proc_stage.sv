// proc_stage: the standard image-processing building block.
//
// A stage is an input FIFO, a frame-processing core and an output FIFO.
// The FIFOs separate three clock domains: the producer writes pixels in
// clock domain 1 (in_clk), the core runs in domain 2 (proc_clk), and the
// consumer reads results in domain 3 (out_clk).  Because every stage looks
// the same from outside (8-bit data, write enable in, read enable and empty
// out), stages can be chained in any order to build erosion, dilation,
// opening or closing chains.
//
// OP selects the core:
//   OP_THRESHOLD - bg_threshold comparator (threshold and bg_bright are
//                  configuration inputs, assumed static while pixels flow),
//   OP_ERODE     - morph_rect erosion with an SE_W x SE_H rectangle,
//   OP_DILATE    - morph_rect dilation with an SE_W x SE_H rectangle.
// The core moves one pixel per proc_clk cycle while the input FIFO is not
// empty and the output FIFO is not full, and waits otherwise.
//
// The producer must not write while in_full is high; the consumer reads with
// out_rd_en while out_empty is low, and out_data is valid whenever out_empty
// is low (show-ahead).  Each domain has its own synchronous reset; all three
// should be applied together, and proc_rst also marks the start of a frame
// for the morphology cores.  The in_full output is this design's addition.
module proc_stage
  import eyetoy_pkg::*;
#(
  parameter proc_op_e    OP      = OP_ERODE,
  parameter int unsigned IMG_W   = 640,
  parameter int unsigned IMG_H   = 480,
  parameter int unsigned SE_W    = 3,
  parameter int unsigned SE_H    = 3,
  parameter int unsigned FIFO_AW = 4
) (
  // clock domain 1: producer
  input  logic       in_clk,
  input  logic       in_rst,
  input  logic       in_wr_en,
  input  logic [7:0] in_data,
  output logic       in_full,
  // clock domain 2: processing
  input  logic       proc_clk,
  input  logic       proc_rst,
  input  logic [7:0] threshold,
  input  logic       bg_bright,
  // clock domain 3: consumer
  input  logic       out_clk,
  input  logic       out_rst,
  input  logic       out_rd_en,
  output logic [7:0] out_data,
  output logic       out_empty
);

  logic [7:0] c_in_data, c_out_data;
  logic       c_in_empty, c_in_rd_en;
  logic       c_out_wr_en, c_out_full;

  async_fifo #(.DATA_W(8), .ADDR_W(FIFO_AW)) u_in_fifo (
    .wr_clk(in_clk),   .wr_rst(in_rst),   .wr_en(in_wr_en),   .din(in_data), .full(in_full),
    .rd_clk(proc_clk), .rd_rst(proc_rst), .rd_en(c_in_rd_en), .dout(c_in_data), .empty(c_in_empty)
  );

  generate
    if (OP == OP_THRESHOLD) begin : g_thresh
      logic fg_unused;
      bg_threshold u_core (
        .y(c_in_data), .threshold(threshold), .bg_bright(bg_bright),
        .fg(fg_unused), .fg_byte(c_out_data)
      );
      assign c_in_rd_en  = !c_in_empty && !c_out_full;
      assign c_out_wr_en = c_in_rd_en;
    end else begin : g_morph
      morph_rect #(
        .IMG_W(IMG_W), .IMG_H(IMG_H), .SE_W(SE_W), .SE_H(SE_H),
        .DILATE(OP == OP_DILATE)
      ) u_core (
        .clk(proc_clk), .rst(proc_rst),
        .in_data(c_in_data), .in_empty(c_in_empty), .in_rd_en(c_in_rd_en),
        .out_data(c_out_data), .out_wr_en(c_out_wr_en), .out_full(c_out_full)
      );
    end
  endgenerate

  async_fifo #(.DATA_W(8), .ADDR_W(FIFO_AW)) u_out_fifo (
    .wr_clk(proc_clk), .wr_rst(proc_rst), .wr_en(c_out_wr_en), .din(c_out_data), .full(c_out_full),
    .rd_clk(out_clk),  .rd_rst(out_rst),  .rd_en(out_rd_en),   .dout(out_data),  .empty(out_empty)
  );

endmodule
