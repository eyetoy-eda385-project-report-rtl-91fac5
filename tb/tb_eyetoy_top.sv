// tb_eyetoy_top: end-to-end test of the whole design at its default sizes.
//
// Display path: two full 800 x 525 frames at the pixel clock with a random
// camera byte every clock.  The testbench keeps its own raster, picks the Y
// bytes itself and predicts sync and colour for every clock.  The wall is
// switched off for part of the second frame.
//
// Player extraction, running at the same time on its own three clocks: one
// full 640 x 480 frame of a synthetic scene (bright background, a dark
// player standing in the wall's hole, 2 % noise pixels).  The producer
// leaves random gaps, the reader stalls in bursts, and every mask pixel is
// compared with threshold -> 3x3 erosion -> 3x3 dilation evaluated directly.
//
// Each mechanism is counted and must occur at least once: wall pixels,
// camera pixels, blanking, hsync and vsync pulses, wall disabled, input
// gaps, input back-pressure (ip_full), output FIFO empty while the core
// waits, noise pixels removed by the opening, pixels restored by the
// dilation.
module tb_eyetoy_top;
  import morph_ref_pkg::*;

  localparam int HT = 800, VT = 525, NC = HT * VT * 2 + 10;
  localparam int W = 640, H = 480, N = W * H;
  localparam byte unsigned TH = 8'd128;

  logic clk_pix = 0, rst = 1, wall_en = 1;
  logic [7:0] cam_data = 0;
  logic hs_n, vs_n;
  logic [2:0] red, green;
  logic [1:0] blue;

  logic ip_cam_clk = 0, ip_proc_clk = 0, ip_out_clk = 0, ip_rst = 1;
  logic ip_wr_en = 0, ip_full, ip_rd_en = 0, ip_out_empty;
  logic [7:0] ip_data = 0, ip_out_data;

  int checks = 0, failures = 0;

  eyetoy_top dut (
    .clk_pix(clk_pix), .rst(rst), .cam_data(cam_data), .wall_en(wall_en),
    .vga_hsync_n(hs_n), .vga_vsync_n(vs_n), .vga_red(red), .vga_green(green), .vga_blue(blue),
    .ip_cam_clk(ip_cam_clk), .ip_cam_rst(ip_rst), .ip_wr_en(ip_wr_en), .ip_data(ip_data), .ip_full(ip_full),
    .ip_proc_clk(ip_proc_clk), .ip_proc_rst(ip_rst), .ip_threshold(TH), .ip_bg_bright(1'b1),
    .ip_out_clk(ip_out_clk), .ip_out_rst(ip_rst), .ip_rd_en(ip_rd_en),
    .ip_out_data(ip_out_data), .ip_out_empty(ip_out_empty));

  always #20 clk_pix     = ~clk_pix;       // 25 MHz
  always #20 ip_cam_clk  = ~ip_cam_clk;
  always #7  ip_proc_clk = ~ip_proc_clk;
  always #15 ip_out_clk  = ~ip_out_clk;

  // mechanism counters
  int n_wall = 0, n_cam = 0, n_blank = 0, n_hs = 0, n_vs = 0, n_nowall = 0;
  int n_gap = 0, n_full = 0, n_oempty = 0, n_removed = 0, n_restored = 0;
  bit vga_done = 0, ip_done = 0;

  initial begin
    #40000000;
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

  // ---------------- display path ----------------
  int ph [NC], pv [NC], ylat [NC];
  bit wen [NC];

  initial begin
    int h, v, yl;
    bit prev_hs, prev_vs;
    h = 0; v = 0; yl = 0; prev_hs = 1; prev_vs = 1;
    repeat (3) @(posedge clk_pix);
    for (int k = 0; k < NC; k++) begin
      @(negedge clk_pix);
      if (k == 0) rst = 0;
      cam_data = 8'($urandom);
      wall_en  = !(k > HT * VT + HT * 100 && k < HT * VT + HT * 200);
      ph[k] = h; pv[k] = v; wen[k] = wall_en;
      if (h % 2 == 1) yl = cam_data;
      ylat[k] = yl;
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
        if ({red, green, blue} !== rgb || hs_n !== hs || vs_n !== vs) begin
          failures++;
          if (failures < 10) $display("FAIL vga k=%0d pos=(%0d,%0d) rgb=%b exp=%b", k, x, yy, {red,green,blue}, rgb);
        end
        if (!on) n_blank++;
        else if (w) n_wall++;
        else begin
          n_cam++;
          if (!wen[k-1] && !hole(x, yy)) n_nowall++;
        end
        if (!hs_n && prev_hs) n_hs++;
        if (!vs_n && prev_vs) n_vs++;
        prev_hs = hs_n; prev_vs = vs_n;
      end
      h++;
      if (h == HT) begin h = 0; v = (v == VT - 1) ? 0 : v + 1; end
    end
    checks++;
    if (n_hs != 2 * VT) begin failures++; $display("FAIL hsync pulses %0d", n_hs); end
    checks++;
    if (n_vs != 2) begin failures++; $display("FAIL vsync pulses %0d", n_vs); end
    vga_done = 1;
  end

  // ---------------- player extraction ----------------
  byte unsigned pix [N];
  bit expv [N];
  int ip = 0, op = 0;

  initial begin
    bit th[], er[], di[];
    th = new[N];
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      bit fg;
      fg = hole(c, r);
      if ($urandom_range(0, 49) == 0) fg = !fg;
      pix[r * W + c] = fg ? 8'($urandom_range(5, 110)) : 8'($urandom_range(150, 250));
      th[r * W + c] = thresh(pix[r * W + c], TH, 1'b1);
    end
    morph(th, er, W, H, 3, 3, 1'b0);
    morph(er, di, W, H, 3, 3, 1'b1);
    for (int i = 0; i < N; i++) begin
      expv[i] = di[i];
      if (th[i] && !di[i]) n_removed++;
      if (!er[i] && di[i]) n_restored++;
    end
  end

  always @(negedge ip_cam_clk) begin
    if (ip_rst) ip_wr_en = 0;
    else begin
      ip_wr_en = (ip < N) && !ip_full && ($urandom_range(0, 7) != 0);
      if (ip < N && !ip_full && !ip_wr_en) n_gap++;
      if (ip_full) n_full++;
      ip_data = ip_wr_en ? pix[ip] : 8'($urandom);
    end
  end
  always @(posedge ip_cam_clk) if (ip_wr_en) ip++;

  int burst = 0;
  always @(negedge ip_out_clk) begin
    if (ip_rst) ip_rd_en = 0;
    else begin
      // read steadily, with occasional long pauses
      if (burst > 0) burst--;
      else if ($urandom_range(0, 999) == 0) burst = 200;
      ip_rd_en = !ip_out_empty && burst == 0;
      if (ip_out_empty && op < N) n_oempty++;
    end
  end
  always @(posedge ip_out_clk) begin
    if (ip_rd_en) begin
      checks++;
      if (op >= N || ip_out_data !== {8{expv[op]}}) begin
        failures++;
        if (failures < 10) $display("FAIL mask pixel %0d (r%0d c%0d) got %h exp %0d", op, op / W, op % W, ip_out_data, expv[op]);
      end
      op++;
      if (op == N) ip_done = 1;
    end
  end

  initial begin
    repeat (4) @(posedge ip_out_clk);
    @(negedge ip_out_clk) ip_rst = 0;
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    wait (vga_done && ip_done);
    #1000;
    $display("mechanisms:");
    need(n_wall, "wall pixels");
    need(n_cam, "camera pixels");
    need(n_blank, "blanking pixels");
    need(n_hs, "hsync pulses");
    need(n_vs, "vsync pulses");
    need(n_nowall, "pixels with wall disabled");
    need(n_gap, "input gaps");
    need(n_full, "input back-pressure cycles");
    need(n_oempty, "output empty cycles");
    need(n_removed, "noise pixels removed");
    need(n_restored, "pixels restored by dilation");
    checks++;
    if (op != N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
