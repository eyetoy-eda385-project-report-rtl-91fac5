// async_fifo: dual-clock FIFO placed at both ends of every processing stage,
// so that the pixel source, the processing core and the pixel sink may each
// run in a clock domain of their own.
//
// Pointers are ADDR_W+1 bits wide; each side keeps its pointer in binary and
// in Gray code, and the Gray pointer crosses to the other side through a
// two-flop synchroniser.  full and empty are computed from the local pointer
// and the synchronised remote one, so both are conservative: a slot freed or
// filled on the other side is seen two to three clocks later.
// Reads are show-ahead: while empty is low, dout already holds the oldest
// word, and rd_en removes it at the clock edge.  A write with full high and
// a read with empty high are ignored (and flagged by assertions).
// Depth 2**ADDR_W (default 16) and the show-ahead read are this design's
// choice; the port names follow the Data / Wr_en / rd_en / Empty of the
// processing block.
//
// Resets: wr_rst and rd_rst are synchronous to their own clocks and should
// be applied together.
module async_fifo #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              wr_clk,
  input  logic              wr_rst,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] din,
  output logic              full,

  input  logic              rd_clk,
  input  logic              rd_rst,
  input  logic              rd_en,
  output logic [DATA_W-1:0] dout,
  output logic              empty
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  logic [ADDR_W:0] wbin, wgray, rbin, rgray;
  logic [ADDR_W:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [ADDR_W:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  logic            do_wr;
  logic [ADDR_W:0] wbin_nxt, wgray_nxt;

  assign do_wr     = wr_en && !full;
  assign wbin_nxt  = wbin + ADDR_W'(do_wr);
  assign wgray_nxt = bin2gray(wbin_nxt);

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[ADDR_W-1:0]] <= din;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      full     <= 1'b0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= wgray_nxt;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      full     <= (wgray_nxt == {~rgray_w2[ADDR_W:ADDR_W-1], rgray_w2[ADDR_W-2:0]});
    end
  end

  // ---------------- read side ----------------
  logic            do_rd;
  logic [ADDR_W:0] rbin_nxt, rgray_nxt;

  assign do_rd     = rd_en && !empty;
  assign rbin_nxt  = rbin + ADDR_W'(do_rd);
  assign rgray_nxt = bin2gray(rbin_nxt);
  assign dout      = mem[rbin[ADDR_W-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      empty    <= 1'b1;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= rgray_nxt;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      empty    <= (rgray_nxt == wgray_r2);
    end
  end

  // ---------------- handshake rules ----------------
  a_no_write_when_full: assert property (@(posedge wr_clk) disable iff (wr_rst)
    !(wr_en && full))
    else $error("async_fifo: write while full");

  a_no_read_when_empty: assert property (@(posedge rd_clk) disable iff (rd_rst)
    !(rd_en && empty))
    else $error("async_fifo: read while empty");

endmodule
