// tb_vga_timing: runs the raster generator at its default 800 x 525 size for
// two frames and compares every output, every clock, with counters kept by
// the testbench.  Also checks the line period (800 clocks), the frame period
// (420000 clocks), the sync pulse widths and the number of visible pixels.
module tb_vga_timing;
  logic clk = 0, rst = 1;
  logic [9:0] hcount, vcount;
  logic hsync_n, vsync_n, video_on, line_start, frame_start;
  int checks = 0, failures = 0;

  localparam int HT = 800, VT = 525;

  vga_timing dut (.clk(clk), .rst(rst), .hcount(hcount), .vcount(vcount),
                  .hsync_n(hsync_n), .vsync_n(vsync_n), .video_on(video_on),
                  .line_start(line_start), .frame_start(frame_start));

  always #20 clk = ~clk;

  initial begin
    repeat (2 * HT * VT + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at h=%0d v=%0d", what, hcount, vcount);
    end
  endtask

  initial begin
    int eh, ev, vis, hs_low, vs_low, last_ls, last_fs, cyc;
    int ls_period, fs_period;
    eh = 1; ev = 0; vis = 0; hs_low = 0; vs_low = 0; last_ls = -1; last_fs = -1; cyc = 0;
    ls_period = 0; fs_period = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;   // reset state is (0,0); first compared position is (1,0)
    for (int n = 0; n < 2 * HT * VT; n++) begin
      @(negedge clk);
      chk(hcount == 10'(eh) && vcount == 10'(ev), "counters");
      chk(hsync_n == !(eh >= 656 && eh < 752), "hsync");
      chk(vsync_n == !(ev >= 490 && ev < 492), "vsync");
      chk(video_on == (eh < 640 && ev < 480), "video_on");
      chk(line_start == (eh == 0), "line_start");
      chk(frame_start == (eh == 0 && ev == 0), "frame_start");
      if (n < HT * VT) begin
        if (video_on) vis++;
        if (!hsync_n && ev == 0) hs_low++;
        if (!vsync_n && eh == 0) vs_low++;
      end
      if (line_start) begin
        if (last_ls >= 0) ls_period = cyc - last_ls;
        last_ls = cyc;
      end
      if (frame_start) begin
        if (last_fs >= 0) fs_period = cyc - last_fs;
        last_fs = cyc;
      end
      cyc++;
      eh++;
      if (eh == HT) begin eh = 0; ev = (ev == VT - 1) ? 0 : ev + 1; end
    end
    chk(vis == 640 * 480, "visible pixel count");
    chk(hs_low == 96, "hsync width");
    chk(vs_low == 2, "vsync width");
    chk(ls_period == HT, "line period");
    chk(fs_period == HT * VT, "frame period");
    $display("visible=%0d hsync_w=%0d vsync_lines=%0d line=%0d frame=%0d", vis, hs_low, vs_low, ls_period, fs_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
