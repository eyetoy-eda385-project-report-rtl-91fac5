// tb_bg_threshold: exhaustive check of the brightness comparator over all
// 256 luminance values, a spread of thresholds and both polarities.
module tb_bg_threshold;
  import morph_ref_pkg::*;

  logic [7:0] y, th;
  logic       bg_bright, fg;
  logic [7:0] fg_byte;
  int checks = 0, failures = 0;

  bg_threshold dut (.y(y), .threshold(th), .bg_bright(bg_bright), .fg(fg), .fg_byte(fg_byte));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ths[6] = '{0, 1, 64, 128, 200, 255};
    foreach (ths[k]) begin
      for (int b = 0; b < 2; b++) begin
        for (int v = 0; v < 256; v++) begin
          bit e;
          y = 8'(v); th = 8'(ths[k]); bg_bright = b[0];
          #1;
          e = thresh(byte'(v), byte'(ths[k]), b[0]);
          checks++;
          if (fg !== e || fg_byte !== {8{e}}) begin
            failures++;
            if (failures < 10) $display("FAIL y=%0d th=%0d bg_bright=%0d fg=%0d exp=%0d", v, ths[k], b, fg, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
