// tb_spiht_shift: the shift into the common format. Random records (all
// levels 0..6, including the most negative coefficient) must give
// magnitude |c| * 2^level and the sign bit of each coefficient.
module tb_spiht_shift;
  import spiht_pkg::*;
  blk_rec_t rec;
  logic [3:0][MAG_W-1:0] mag;
  logic [3:0] sign;
  int checks = 0, failures = 0;

  spiht_shift dut (.rec, .mag, .sign);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      rec = {$urandom(), $urandom(), $urandom(), $urandom()};
      rec.level = 3'($urandom_range(0, 6));
      if (t % 50 == 0) rec.coef[0] = 16'h8000;
      #1;
      for (int i = 0; i < 4; i++) begin
        int v, e;
        v = $signed(rec.coef[i]);
        e = ((v < 0) ? -v : v) * (1 << rec.level);
        checks++;
        if (int'(mag[i]) != e || sign[i] != (v < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL coef %0d level %0d: mag %0d sign %0d", v, rec.level, mag[i], sign[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
