// tb_vfp_scale: Variable Fixed-Point scaling. Random accumulator values of
// all sizes and both shifts are compared with division by 2^shift rounded
// half up and clamped to 16 bits; the overflow flag must be raised exactly
// when clamping was needed, and both saturation directions must occur.
module tb_vfp_scale;
  import spiht_pkg::*;
  logic signed [ACC_W-1:0] acc;
  logic [4:0] shift;
  logic signed [15:0] y;
  logic ovf;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  vfp_scale dut (.acc, .shift, .y, .ovf);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      longint a, q, e;
      bit eo;
      int sh, mag;
      sh = (t % 2) ? 15 : 14;
      mag = $urandom_range(0, 33);
      a = longint'({$urandom(), $urandom()}) >>> (63 - mag);
      acc = ACC_W'(a); shift = 5'(sh);
      #1;
      q = a / (longint'(1) << sh);                 // truncating division
      if (a - q * (longint'(1) << sh) < 0) q = q - 1; // floor
      if ((a - q * (longint'(1) << sh)) * 2 >= (longint'(1) << sh)) q = q + 1;
      e = q; eo = 0;
      if (q > 32767) begin e = 32767; eo = 1; n_pos++; end
      if (q < -32768) begin e = -32768; eo = 1; n_neg++; end
      checks++;
      if (y != 16'(e) || ovf != eo) begin
        failures++;
        if (failures < 10) $display("FAIL acc=%0d sh=%0d y=%0d ovf=%0d expected %0d %0d", a, sh, y, ovf, e, eo);
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
