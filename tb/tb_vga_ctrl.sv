// tb_vga_ctrl: the display path at its default 800 x 525 raster for two
// frames, with a random camera byte every clock.  The testbench keeps
// its own raster position, picks the Y bytes (odd byte index within a line)
// itself, and predicts every output two clocks after the raster position:
// hcount/vcount, both syncs, the wall flag and the 3-3-2 colour.  wall_en is
// switched off for part of the run.  Also checks that the sync period is
// 800 clocks per line and 420000 per frame at the outputs.
module tb_vga_ctrl;
  localparam int HT = 800, VT = 525, NC = HT * VT * 2 + HT * 20;

  logic clk = 0, rst = 1, wall_en = 1;
  logic [7:0] cam_data = 0;
  logic hsync_n, vsync_n, is_wall, video_on;
  logic [2:0] red, green;
  logic [1:0] blue;
  logic [9:0] hcount, vcount;
  int checks = 0, failures = 0;

  vga_ctrl dut (.clk(clk), .rst(rst), .cam_data(cam_data), .wall_en(wall_en),
                .hsync_n(hsync_n), .vsync_n(vsync_n), .red(red), .green(green), .blue(blue),
                .is_wall(is_wall), .video_on(video_on), .hcount(hcount), .vcount(vcount));

  always #20 clk = ~clk;

  initial begin
    repeat (NC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit hole(int x, int v);
    return (x >= 280 && x <= 359 && v >= 150 && v <= 239) ||
           (x >= 150 && x <= 489 && v >= 240 && v <= 279) ||
           (x >= 240 && x <= 399 && v >= 240 && v <= 479);
  endfunction

  int ph [NC], pv [NC], ylat [NC];
  bit wen [NC];

  initial begin
    bit prev_hs, prev_vs;
    int h, v, yl, n_wall, n_cam, n_blank, last_hs, last_vs, hs_per, vs_per;
    h = 0; v = 0; yl = 0; n_wall = 0; n_cam = 0; n_blank = 0;
    prev_hs = 1; prev_vs = 1; last_hs = -1; last_vs = -1; hs_per = 0; vs_per = 0;
    repeat (3) @(posedge clk);
    for (int k = 0; k < NC; k++) begin
      @(negedge clk);
      if (k == 0) rst = 0;
      // stimulus for cycle k
      cam_data = 8'($urandom);
      wall_en  = !(k > HT * VT + 1000 && k < HT * VT + 60000);
      ph[k] = h; pv[k] = v; wen[k] = wall_en;
      if (h % 2 == 1) yl = cam_data;
      ylat[k] = yl;
      // outputs of cycle k describe raster position of cycle k-2
      if (k >= 2) begin
        int x, yy, y;
        bit on, w, hs, vs;
        logic [7:0] rgb;
        x = ph[k-2]; yy = pv[k-2]; y = ylat[k-2];
        on = (x < 640 && yy < 480);
        hs = !(x >= 656 && x < 752);
        vs = !(yy >= 490 && yy < 492);
        w  = on && wen[k-1] && !hole(x, yy);
        if (!on)    rgb = 8'h00;
        else if (w) rgb = 8'b111_000_00;
        else        rgb = {y[7:5], y[7:5], y[7:6]};
        checks++;
        if ({red, green, blue} !== rgb || is_wall !== w || hsync_n !== hs || vsync_n !== vs ||
            video_on !== on || hcount !== 10'(x) || vcount !== 10'(yy)) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d pos=(%0d,%0d) rgb=%b exp=%b wall=%0d exp=%0d hs=%0d/%0d vs=%0d/%0d",
                                      k, x, yy, {red,green,blue}, rgb, is_wall, w, hsync_n, hs, vsync_n, vs);
        end
        if (!on) n_blank++; else if (w) n_wall++; else n_cam++;
        // sync periods at the outputs (falling edges)
        if (!hsync_n && prev_hs) begin if (last_hs >= 0) hs_per = k - last_hs; last_hs = k; end
        if (!vsync_n && prev_vs) begin if (last_vs >= 0) vs_per = k - last_vs; last_vs = k; end
        prev_hs = hsync_n; prev_vs = vsync_n;
      end
      h++;
      if (h == HT) begin h = 0; v = (v == VT - 1) ? 0 : v + 1; end
    end
    checks++;
    if (hs_per != HT || vs_per != HT * VT || n_wall == 0 || n_cam == 0 || n_blank == 0) failures++;
    $display("wall=%0d camera=%0d blank=%0d line=%0d frame=%0d", n_wall, n_cam, n_blank, hs_per, vs_per);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
