// tb_proc_stage: three processing stages, one per core type (threshold,
// 3 x 3 erosion, 2 x 3 dilation), each with its producer, core and consumer
// on three unrelated clocks (7 ns, 5 ns, 11 ns).  Producers write with random
// gaps and respect in_full; consumers read at random and respect out_empty.
// Two 10 x 6 frames go through each stage and every byte read out is
// compared with the reference model.  The testbench also checks that
// in_full is raised (the consumer is slower than the producer at times) and
// that every pixel comes out.
module tb_proc_stage;
  import eyetoy_pkg::*;
  import morph_ref_pkg::*;

  localparam int W = 10, H = 6, NF = 2, N = W * H * NF;
  localparam byte unsigned TH = 8'd100;

  logic in_clk = 0, proc_clk = 0, out_clk = 0, rst = 1;
  int checks = 0, failures = 0;
  bit done [3];
  int n_full [3];

  always #3.5 in_clk   = ~in_clk;
  always #2.5 proc_clk = ~proc_clk;
  always #5.5 out_clk  = ~out_clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_st
    localparam proc_op_e OPG = (g == 0) ? OP_THRESHOLD : (g == 1) ? OP_ERODE : OP_DILATE;
    localparam int SW = (g == 1) ? 3 : 2;
    localparam int SH = 3;

    logic       wr_en = 0, full, rd_en = 0, empty;
    logic [7:0] din = 0, dout;
    byte unsigned data [N];
    bit           expv [N];
    int ip = 0, op = 0;

    proc_stage #(.OP(OPG), .IMG_W(W), .IMG_H(H), .SE_W(SW), .SE_H(SH), .FIFO_AW(3)) dut (
      .in_clk(in_clk), .in_rst(rst), .in_wr_en(wr_en), .in_data(din), .in_full(full),
      .proc_clk(proc_clk), .proc_rst(rst), .threshold(TH), .bg_bright(1'b1),
      .out_clk(out_clk), .out_rst(rst), .out_rd_en(rd_en), .out_data(dout), .out_empty(empty));

    initial begin
      for (int f = 0; f < NF; f++) begin
        bit src[], dst[];
        src = new[W * H];
        for (int i = 0; i < W * H; i++) begin
          if (g == 0) begin
            data[f * W * H + i] = 8'($urandom);
            dst = new[W * H];
          end else begin
            src[i] = (g == 1) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
            data[f * W * H + i] = src[i] ? 8'hFF : 8'h00;
          end
        end
        if (g == 0) for (int i = 0; i < W * H; i++) dst[i] = thresh(data[f * W * H + i], TH, 1'b1);
        else        morph(src, dst, W, H, SW, SH, g == 2);
        for (int i = 0; i < W * H; i++) expv[f * W * H + i] = dst[i];
      end
    end

    // producer, clock domain 1
    always @(negedge in_clk) begin
      if (rst) wr_en = 0;
      else begin
        wr_en = (ip < N) && !full && ($urandom_range(0, 2) != 0);
        din   = wr_en ? data[ip] : 8'($urandom);
        if (full) n_full[g]++;
      end
    end
    always @(posedge in_clk) if (wr_en) ip++;

    // consumer, clock domain 3
    always @(negedge out_clk) begin
      if (rst) rd_en = 0;
      else rd_en = !empty && ($urandom_range(0, 3) != 0);
    end
    always @(posedge out_clk) begin
      if (rd_en) begin
        checks++;
        if (op >= N || dout !== {8{expv[op]}}) begin
          failures++;
          if (failures < 10) $display("FAIL stage%0d pixel %0d got %h exp %0d", g, op, dout, expv[op]);
        end
        op++;
        if (op == N) done[g] = 1;
      end
    end
  end

  initial begin
    repeat (4) @(posedge out_clk);
    @(negedge out_clk) rst = 0;
    wait (done[0] && done[1] && done[2]);
    repeat (20) @(posedge out_clk);
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (n_full[g] == 0) begin
        failures++;
        $display("FAIL stage%0d never full", g);
      end
    end
    checks++;
    if (g_st[0].op != N || g_st[1].op != N || g_st[2].op != N) failures++;
    $display("full cycles: %0d %0d %0d", n_full[0], n_full[1], n_full[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
