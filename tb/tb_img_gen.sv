// tb_img_gen: random screen positions, visibility, wall enable and luma;
// the expected colour is computed from the testbench's own copy of the
// default hole (head 280..359 x 150..239, arms 150..489 x 240..279,
// body 240..399 x 240..479), one clock after the inputs.
module tb_img_gen;
  logic clk = 0, rst = 1;
  logic wall_en = 1, video_on = 0;
  logic [9:0] hcount = 0, vcount = 0;
  logic [7:0] y = 0;
  logic [2:0] red, green;
  logic [1:0] blue;
  logic is_wall;
  int checks = 0, failures = 0;
  int n_wall = 0, n_hole = 0, n_blank = 0;

  img_gen dut (.clk(clk), .rst(rst), .wall_en(wall_en), .hcount(hcount), .vcount(vcount),
               .video_on(video_on), .y(y), .red(red), .green(green), .blue(blue), .is_wall(is_wall));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    logic [7:0] exp_rgb;
    bit exp_wall;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 30000; n++) begin
      hcount   = 10'($urandom_range(0, 799));
      vcount   = 10'($urandom_range(0, 524));
      if (n % 3 == 0) begin  // bias towards the hole region
        hcount = 10'($urandom_range(140, 500));
        vcount = 10'($urandom_range(140, 479));
      end
      video_on = (hcount < 640 && vcount < 480) ? 1'b1 : ($urandom_range(0, 9) == 0);
      wall_en  = ($urandom_range(0, 7) != 0);
      y        = 8'($urandom);
      if (!video_on)                                    begin exp_rgb = 8'h00; exp_wall = 0; end
      else if (wall_en && !hole(int'(hcount), int'(vcount))) begin exp_rgb = 8'b111_000_00; exp_wall = 1; end
      else begin exp_rgb = {y[7:5], y[7:5], y[7:6]}; exp_wall = 0; end
      @(negedge clk);
      checks++;
      if ({red, green, blue} !== exp_rgb || is_wall !== exp_wall) begin
        failures++;
        if (failures < 10) $display("FAIL h=%0d v=%0d on=%0d we=%0d rgb=%b exp=%b", hcount, vcount, video_on, wall_en, {red,green,blue}, exp_rgb);
      end
      if (!video_on) n_blank++; else if (exp_wall) n_wall++; else n_hole++;
    end
    checks++;
    if (n_wall == 0 || n_hole == 0 || n_blank == 0) failures++;
    $display("wall=%0d camera=%0d blank=%0d", n_wall, n_hole, n_blank);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
