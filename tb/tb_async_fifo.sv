// tb_async_fifo: writer and reader on unrelated clocks (10 ns and 17 ns),
// random write and read enables that respect full and empty, and a
// scoreboard queue.  Phases with the reader stopped fill the FIFO until full
// is raised; phases with the writer stopped drain it until empty.  Checks
// order and value of every word, that the FIFO holds exactly 16 words
// when full settles (full may lag a read by the synchroniser delay) and
// that empty appears after the last word leaves.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  byte unsigned q[$];
  int n_full = 0, n_empty_wait = 0, n_read = 0;
  int phase = 0;   // 0 random, 1 reader stopped, 2 writer stopped

  async_fifo #(.DATA_W(8), .ADDR_W(4)) dut (
    .wr_clk(wclk), .wr_rst(rst), .wr_en(wr_en), .din(din), .full(full),
    .rd_clk(rclk), .rd_rst(rst), .rd_en(rd_en), .dout(dout), .empty(empty));

  always #5  wclk = ~wclk;
  always #8.5 rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    @(negedge wclk);
    wait (!rst);
    forever begin
      @(negedge wclk);
      wr_en = 0;
      if (full) begin
        n_full++;
        checks++;
        // full may lag a read by the synchroniser delay, never more
        if (q.size() < 13) begin
          failures++;
          $display("FAIL full with %0d words", q.size());
        end
      end else if (phase != 2 && $urandom_range(0, 3) != 0) begin
        wr_en = 1;
        din = 8'($urandom);
      end
      @(posedge wclk);
      if (wr_en) q.push_back(din);
    end
  end

  // reader
  initial begin
    @(negedge rclk);
    wait (!rst);
    forever begin
      @(negedge rclk);
      rd_en = 0;
      if (!empty && phase != 1 && $urandom_range(0, 2) != 0) begin
        rd_en = 1;
        checks++;
        if (q.size() == 0 || dout !== q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL dout=%h exp=%h size=%0d", dout, (q.size() ? q[0] : 0), q.size());
        end
      end else if (empty) n_empty_wait++;
      @(posedge rclk);
      if (rd_en) begin void'(q.pop_front()); n_read++; end
    end
  end

  initial begin
    repeat (4) @(posedge rclk);
    rst = 0;
    for (int k = 0; k < 6; k++) begin
      phase = 0; repeat (2000) @(posedge wclk);
      phase = 1; repeat (200)  @(posedge wclk);
      // reader stopped long enough: exactly 16 words and full
      checks++;
      if (q.size() != 16 || !full) begin
        failures++;
        $display("FAIL not full: %0d words, full=%0d", q.size(), full);
      end
      phase = 2; repeat (200)  @(posedge wclk);
      // writer stopped long enough: everything must have been read
      checks++;
      if (q.size() != 0 || !empty) begin
        failures++;
        $display("FAIL not drained: %0d left, empty=%0d", q.size(), empty);
      end
    end
    checks++;
    if (n_full == 0 || n_empty_wait == 0 || n_read < 1000) failures++;
    $display("reads=%0d full_cycles=%0d empty_waits=%0d", n_read, n_full, n_empty_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
