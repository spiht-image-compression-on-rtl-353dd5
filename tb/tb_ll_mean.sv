// tb_ll_mean: LL mean calculation and subtraction. Several random 8x8 LL
// bands (16 four-lane beats each, with idle clocks and a clear between
// bands) are accumulated; the mean must equal the rounded average, and the
// subtraction outputs must equal value minus mean, clamped to 16 bits
// (large inputs force both clamps).
module tb_ll_mean;
  import spiht_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, acc_en = 0;
  always #5 clk = ~clk;
  logic [3:0][15:0] ax = '0, sx = '0, sy;
  coef_t mean;
  int checks = 0, failures = 0, nsat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  ll_mean #(.LOG2CNT(6)) dut (.clk, .rst_n, .clr, .acc_en, .acc_x(ax), .mean, .sub_x(sx), .sub_y(sy));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      longint sum;
      int em;
      clr = 1; @(negedge clk); clr = 0;
      sum = 0;
      for (int b = 0; b < 16; b++) begin
        for (int i = 0; i < 4; i++) begin
          int v;
          v = (t % 4 == 0) ? int'($urandom_range(20000, 32767)) : int'($urandom_range(0, 65535)) - 32768;
          if (t % 4 == 1) v = -int'($urandom_range(20000, 32768));
          ax[i] = 16'(v); sum += v;
        end
        acc_en = 1; @(negedge clk); acc_en = 0;
        if ($urandom_range(0, 2) == 0) @(negedge clk);
      end
      em = int'((sum + 32) >>> 6);
      check(mean == 16'(em), $sformatf("mean %0d expected %0d", mean, em));
      for (int b = 0; b < 8; b++) begin
        for (int i = 0; i < 4; i++) sx[i] = 16'($urandom());
        #1;
        for (int i = 0; i < 4; i++) begin
          int d;
          d = int'($signed(sx[i])) - em;
          if (d > 32767 || d < -32768) nsat++;
          d = (d > 32767) ? 32767 : (d < -32768) ? -32768 : d;
          check(sy[i] == 16'(d), $sformatf("sub %0d - %0d = %0d", $signed(sx[i]), em, $signed(sy[i])));
        end
        @(negedge clk);
      end
    end
    check(nsat > 0, "subtraction never clamped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
