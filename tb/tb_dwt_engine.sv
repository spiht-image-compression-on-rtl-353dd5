// tb_dwt_engine: the wavelet phase on 32x32 arrays with two levels, wired to
// two coef_mem memories. Run 1 transforms a random 8-bit image; run 2 starts
// from full-scale alternating coefficients that must overflow and saturate.
// After each run every coefficient of memory A is compared with the
// reference transform, the LL mean and the overflow flag are checked, and
// the clock count must match the schedule: per level two passes of
// (M/4)*(M+4) + 3 clocks, then 2*(R/4)*R + 2 for the LL mean.
module tb_dwt_engine;
  import spiht_pkg::*;
  localparam int LOG2N = 5, LEVELS = 2;
`include "spiht_ref.svh"
  logic clk = 0, rst_n = 0, start = 0, busy, done, ovf;
  always #5 clk = ~clk;
  coef_t mean;
  logic [31:0] cycles;
  logic [3:0] are, awe, bre, bwe, dare, dawe;
  logic [3:0][LOG2N-1:0] arr, arc, awr, awc, brr, brc, bwr, bwc, darr, darc, dawr, dawc;
  logic [3:0][15:0] ard, awd, brd, bwd, dawd;
  logic tb_we = 0, tb_re = 0;
  logic [LOG2N-1:0] tb_r = '0, tb_c = '0;
  logic [15:0] tb_d = '0;

  always_comb begin
    are = dare; arr = darr; arc = darc; awe = dawe; awr = dawr; awc = dawc; awd = dawd;
    if (!busy) begin
      are = '0; are[0] = tb_re; arr[0] = tb_r; arc[0] = tb_c;
      awe = '0; awe[0] = tb_we; awr[0] = tb_r; awc[0] = tb_c; awd[0] = tb_d;
    end
  end

  coef_mem #(.LOG2N(LOG2N)) u_a (.clk, .rd_en(are), .rd_row(arr), .rd_col(arc), .rd_data(ard),
    .wr_en(awe), .wr_row(awr), .wr_col(awc), .wr_data(awd));
  coef_mem #(.LOG2N(LOG2N)) u_b (.clk, .rd_en(bre), .rd_row(brr), .rd_col(brc), .rd_data(brd),
    .wr_en(bwe), .wr_row(bwr), .wr_col(bwc), .wr_data(bwd));
  dwt_engine #(.LOG2N(LOG2N), .LEVELS(LEVELS)) dut (.clk, .rst_n, .start, .busy, .done,
    .ll_mean_value(mean), .overflow(ovf), .cycles,
    .a_rd_en(dare), .a_rd_row(darr), .a_rd_col(darc), .a_rd_data(ard),
    .a_wr_en(dawe), .a_wr_row(dawr), .a_wr_col(dawc), .a_wr_data(dawd),
    .b_rd_en(bre), .b_rd_row(brr), .b_rd_col(brc), .b_rd_data(brd),
    .b_wr_en(bwe), .b_wr_row(bwr), .b_wr_col(bwc), .b_wr_data(bwd));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit expect_ovf);
    int exp_cyc;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      tb_we <= 1; tb_r <= LOG2N'(r); tb_c <= LOG2N'(c); tb_d <= 16'(X[r][c]);
      @(posedge clk);
    end
    tb_we <= 0;
    start <= 1; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    ref_dwt(0);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      tb_re <= 1; tb_r <= LOG2N'(r); tb_c <= LOG2N'(c);
      @(posedge clk); tb_re <= 0; #1;
      @(posedge clk); #1;
      check($signed(ard[0]) == 16'(X[r][c]), $sformatf("(%0d,%0d) = %0d expected %0d", r, c, $signed(ard[0]), X[r][c]));
    end
    check(mean == 16'(mean_ref), $sformatf("mean %0d expected %0d", mean, mean_ref));
    check(ovf == expect_ovf, $sformatf("overflow flag %0d expected %0d", ovf, expect_ovf));
    exp_cyc = 2 * (R / 4) * R + 2;
    for (int l = 0; l < LEVELS; l++) exp_cyc += 2 * (((N >> l) / 4) * ((N >> l) + 4) + 3);
    check(cycles == 32'(exp_cyc), $sformatf("cycles %0d expected %0d", cycles, exp_cyc));
  endtask

  initial begin
    ref_init();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) X[r][c] = int'($urandom_range(0, 255)) * 64;
    run(0);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) X[r][c] = ((r + c) % 2) ? 32767 : -32768;
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
