// tb_morph_rect: two cores side by side on a small 12 x 8 raster, an
// erosion with a 3 x 3 element and a dilation with a 4 x 2 element.  Three
// random frames are streamed back to back with random gaps on the input
// (empty) and random back-pressure on the output (full).  Every output pixel
// is compared with a direct window evaluation of the same frame, and the
// handshake rule rd_en = wr_en = !empty && !full is checked every clock.
// Ones are sent as random non-zero bytes.
module tb_morph_rect;
  import morph_ref_pkg::*;

  localparam int W = 12, H = 8, NF = 3, N = W * H * NF;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0;
  bit done [2];

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int SW  = (g == 0) ? 3 : 4;
    localparam int SH  = (g == 0) ? 3 : 2;
    localparam bit DIL = (g == 1);

    logic [7:0] in_data, out_data;
    logic       in_empty, in_rd_en, out_wr_en, out_full;
    byte unsigned data [N];
    bit           expv [N];
    int ip = 0, op = 0;

    morph_rect #(.IMG_W(W), .IMG_H(H), .SE_W(SW), .SE_H(SH), .DILATE(DIL)) dut (
      .clk(clk), .rst(rst), .in_data(in_data), .in_empty(in_empty), .in_rd_en(in_rd_en),
      .out_data(out_data), .out_wr_en(out_wr_en), .out_full(out_full));

    initial begin
      for (int f = 0; f < NF; f++) begin
        bit src[], dst[];
        src = new[W * H];
        for (int i = 0; i < W * H; i++) begin
          src[i] = DIL ? ($urandom_range(0, 9) < 2) : ($urandom_range(0, 9) < 8);
          data[f * W * H + i] = src[i] ? 8'($urandom_range(1, 255)) : 8'h00;
        end
        morph(src, dst, W, H, SW, SH, DIL);
        for (int i = 0; i < W * H; i++) expv[f * W * H + i] = dst[i];
      end
      in_empty = 1; out_full = 0; in_data = 0;
    end

    always @(negedge clk) begin
      in_empty = !(ip < N && $urandom_range(0, 3) != 0);
      in_data  = (ip < N) ? data[ip] : 8'($urandom);
      if (in_empty) in_data = 8'($urandom);
      out_full = ($urandom_range(0, 4) == 0);
    end

    always @(posedge clk) begin
      if (!rst) begin
        checks++;
        if (in_rd_en !== (!in_empty && !out_full) || out_wr_en !== in_rd_en) begin
          failures++;
          $display("FAIL cfg%0d handshake", g);
        end
        if (in_empty && ip < N) n_in_stall++;
        if (out_full && !in_empty) n_out_stall++;
        if (out_wr_en && op < N) begin
          checks++;
          if (out_data !== {8{expv[op]}}) begin
            failures++;
            if (failures < 10) $display("FAIL cfg%0d pixel %0d (frame %0d r%0d c%0d) got %h exp %0d",
                                        g, op, op / (W * H), (op % (W * H)) / W, op % W, out_data, expv[op]);
          end
          op++;
        end
        if (in_rd_en) ip++;
        if (op == N) done[g] = 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (done[0] && done[1]);
    checks++;
    if (n_in_stall == 0 || n_out_stall == 0) begin
      failures++;
      $display("FAIL stalls not exercised");
    end
    $display("input stalls=%0d output stalls=%0d", n_in_stall, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
