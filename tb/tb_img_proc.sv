// tb_img_proc: the full extraction chain (threshold, 3 x 3 erosion, 3 x 3
// dilation) on a 24 x 16 synthetic scene: a bright background, a dark
// player-like figure, and isolated noise pixels of both kinds (dark specks
// on the background, bright specks on the figure).  Two frames are streamed
// with random gaps in the camera domain and a slow, irregular reader in the
// output domain; proc, camera and output clocks are unrelated.  The mask
// read out is compared pixel by pixel with threshold -> erode -> dilate
// evaluated directly on the frame.  The testbench also counts the specks
// that the opening removed, which must be non-zero, and checks that the
// input back-pressure (in_full) occurred.
module tb_img_proc;
  import morph_ref_pkg::*;

  localparam int W = 24, H = 16, NF = 2, N = W * H * NF;
  localparam byte unsigned TH = 8'd120;

  logic cam_clk = 0, proc_clk = 0, out_clk = 0, rst = 1;
  logic wr_en = 0, full, rd_en = 0, empty;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  byte unsigned data [N];
  bit expv [N];
  int ip = 0, op = 0, n_full = 0, n_removed = 0, n_gap = 0;

  always #4   cam_clk  = ~cam_clk;
  always #2.5 proc_clk = ~proc_clk;
  always #6.5 out_clk  = ~out_clk;

  img_proc #(.IMG_W(W), .IMG_H(H), .SE_W(3), .SE_H(3), .FIFO_AW(3)) dut (
    .cam_clk(cam_clk), .cam_rst(rst), .in_wr_en(wr_en), .in_data(din), .in_full(full),
    .proc_clk(proc_clk), .proc_rst(rst), .threshold(TH), .bg_bright(1'b1),
    .out_clk(out_clk), .out_rst(rst), .out_rd_en(rd_en), .out_data(dout), .out_empty(empty));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit figure(int r, int c);
    return (r >= 3 && r <= 6 && c >= 10 && c <= 14) ||   // head
           (r >= 7 && r <= 9 && c >= 3  && c <= 21) ||   // arms
           (r >= 7 && c >= 8 && c <= 16);                // body
  endfunction

  initial begin
    for (int f = 0; f < NF; f++) begin
      bit th[], er[], di[];
      th = new[W * H];
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        int i;
        bit fg;
        i = r * W + c;
        fg = figure(r, c);
        if ($urandom_range(0, 19) == 0) fg = !fg;               // noise speck
        data[f * W * H + i] = fg ? 8'($urandom_range(10, 100)) : 8'($urandom_range(140, 250));
        th[i] = thresh(data[f * W * H + i], TH, 1'b1);
      end
      morph(th, er, W, H, 3, 3, 1'b0);
      morph(er, di, W, H, 3, 3, 1'b1);
      for (int i = 0; i < W * H; i++) begin
        expv[f * W * H + i] = di[i];
        if (th[i] && !di[i]) n_removed++;
      end
    end
  end

  always @(negedge cam_clk) begin
    if (rst) wr_en = 0;
    else begin
      wr_en = (ip < N) && !full && ($urandom_range(0, 4) != 0);
      if (ip < N && !full && !wr_en) n_gap++;
      if (full) n_full++;
      din = wr_en ? data[ip] : 8'($urandom);
    end
  end
  always @(posedge cam_clk) if (wr_en) ip++;

  always @(negedge out_clk) begin
    if (rst) rd_en = 0;
    else rd_en = !empty && ($urandom_range(0, 2) != 0);
  end
  always @(posedge out_clk) begin
    if (rd_en) begin
      checks++;
      if (op >= N || dout !== {8{expv[op]}}) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d (r%0d c%0d) got %h exp %0d", op, (op % (W * H)) / W, op % W, dout, expv[op]);
      end
      op++;
    end
  end

  initial begin
    repeat (4) @(posedge out_clk);
    @(negedge out_clk) rst = 0;
    wait (op == N);
    repeat (50) @(posedge out_clk);
    checks++;
    if (op != N) failures++;
    checks++;
    if (n_full == 0 || n_gap == 0 || n_removed == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: full=%0d gaps=%0d removed=%0d", n_full, n_gap, n_removed);
    end
    $display("pixels=%0d specks removed=%0d full cycles=%0d input gaps=%0d", op, n_removed, n_full, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
