// tb_dwt_row_filter: one row lane. Random rows of 16 and 32 samples are fed
// with their four flush steps, sometimes with idle clocks between steps, in
// both the row-pass (shift 14) and column-pass (shift 15) scaling; every
// output position is compared with a direct 9/7 convolution with reflected
// edges, rounded and clamped. Each output must appear one clock after the
// step that completes it.
module tb_dwt_row_filter;
  import spiht_pkg::*;
  localparam int LOG2N = 5, LEVELS = 1;
`include "spiht_ref.svh"
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic step = 0, colpass = 0;
  logic [LOG2N:0] c = '0, m = '0;
  coef_t x = '0;
  logic ov, ovf;
  logic [LOG2N:0] on;
  coef_t oy;

  dwt_row_filter #(.LOG2N(LOG2N)) dut (.clk, .rst_n, .in_step(step), .in_c(c), .in_m(m), .in_x(x),
    .in_colpass(colpass), .out_valid(ov), .out_n(on), .out_y(oy), .out_ovf(ovf));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int row [N], out [N];
    int len;
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      len = (t % 3 == 0) ? 16 : 32;
      for (int k = 0; k < N; k++) row[k] = int'($urandom_range(0, 32767)) - 16384;
      colpass = t[0];
      filt(row, len, colpass ? 15 : 14, out);
      for (int k = 0; k < len + 4; k++) begin
        step = 1; c = (LOG2N+1)'(k); m = (LOG2N+1)'(len); x = (k < len) ? 16'(row[k]) : 16'($urandom());
        @(negedge clk);
        step = 0;
        if (k >= 4) begin
          check(ov && int'(on) == k - 4 && oy == 16'(out[k - 4]),
                $sformatf("len %0d n %0d: valid %0d n %0d y %0d expected %0d", len, k - 4, ov, on, oy, out[k - 4]));
        end else check(!ov, "output during the first four steps");
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
