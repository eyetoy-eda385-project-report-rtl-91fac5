// tb_luma_select: feeds random camera bytes with line_start pulses at
// random line lengths and checks that only the second byte of every pair
// (counted from line_start) reaches y, one clock later, and is held.
module tb_luma_select;
  logic clk = 0, rst = 1, line_start = 0;
  logic [7:0] cam_data = 0, y;
  logic y_valid;
  int checks = 0, failures = 0;

  luma_select dut (.clk(clk), .rst(rst), .line_start(line_start), .cam_data(cam_data),
                   .y(y), .y_valid(y_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos, len, ymodel, vmodel, updates;
    ymodel = 0; vmodel = 0; pos = 0; updates = 0;
    len = 7;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 20000; n++) begin
      // drive this cycle's inputs
      line_start = (pos == 0);
      cam_data   = 8'($urandom);
      @(posedge clk);
      // model: byte index within the line decides Y / chroma
      vmodel = (pos % 2 == 1);
      if (vmodel) begin ymodel = cam_data; updates++; end
      pos++;
      if (pos == len) begin pos = 0; len = 3 + $urandom_range(0, 20); end
      @(negedge clk);
      checks++;
      if (y !== 8'(ymodel) || y_valid !== 1'(vmodel)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%h exp=%h valid=%0d exp=%0d", n, y, ymodel, y_valid, vmodel);
      end
    end
    checks++;
    if (updates < 5000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
