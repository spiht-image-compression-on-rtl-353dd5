// tb_mag_engine: the magnitude phase on a 32x32 coefficient array with two
// wavelet levels. Random coefficients (of mixed sizes, so that maxima come
// from different depths) are written into a coef_mem; every record the
// engine writes is compared with one built from a direct recursive search of
// the orientation trees; the record count, the top bit length and the clock
// count (2 per block, plus 1) are checked.
module tb_mag_engine;
  import spiht_pkg::*;
  localparam int LOG2N  = 5;
  localparam int LEVELS = 2;
`include "spiht_ref.svh"

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  always #5 clk = ~clk;
  logic [4:0] top_nb;
  logic [31:0] cycles;
  logic [1:0] m_re;
  logic [1:0][LOG2N-1:0] m_rr, m_rc;
  logic [3:0][15:0] rd;
  logic wr_en;
  logic [2*LOG2N-3:0] wr_addr;
  blk_rec_t wr_data;
  logic [3:0] re, we;
  logic [3:0][LOG2N-1:0] rr, rcl, wr, wc;
  logic [3:0][15:0] wd;
  logic ld = 0;
  logic [LOG2N-1:0] ld_r = '0, ld_c = '0;
  logic [15:0] ld_d = '0;

  always_comb begin
    re = '0; rr = '0; rcl = '0;
    re[1:0] = m_re; rr[1:0] = m_rr; rcl[1:0] = m_rc;
    we = '0; wr = '0; wc = '0; wd = '0;
    we[0] = ld; wr[0] = ld_r; wc[0] = ld_c; wd[0] = ld_d;
  end

  coef_mem #(.LOG2N(LOG2N)) u_mem (.clk, .rd_en(re), .rd_row(rr), .rd_col(rcl), .rd_data(rd),
    .wr_en(we), .wr_row(wr), .wr_col(wc), .wr_data(wd));
  mag_engine #(.LOG2N(LOG2N), .LEVELS(LEVELS)) dut (.clk, .rst_n, .start, .busy, .done, .top_nb,
    .cycles, .rd_en(m_re), .rd_row(m_rr), .rd_col(m_rc), .rd_data(rd[1:0]),
    .wr_en, .wr_addr, .wr_data);

  blk_rec_t got [NBLK];
  int nwr = 0;
  always @(posedge clk) if (wr_en) begin got[wr_addr] <= wr_data; nwr++; end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gmax = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int sh;
      sh = $urandom_range(0, 13);
      X[r][c] = int'($urandom_range(0, (1 << sh))) * (($urandom_range(0, 1) == 1) ? -1 : 1);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      ld <= 1; ld_r <= LOG2N'(r); ld_c <= LOG2N'(c); ld_d <= 16'(X[r][c]);
      @(posedge clk);
    end
    ld <= 0;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    check(nwr == NBLK, $sformatf("%0d records written, expected %0d", nwr, NBLK));
    for (int k = 0; k < NBLK; k++) begin
      int r0, c0; bit root;
      blk_rec_t e;
      blk_pos(k, r0, c0, root);
      e = ref_rec(r0, c0, root);
      check(got[k] == e, $sformatf("record %0d (%0d,%0d): got %h expected %h", k, r0, c0, got[k], e));
    end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) if (nb(cmag(r, c)) > gmax) gmax = nb(cmag(r, c));
    check(top_nb == 5'(gmax), $sformatf("top_nb %0d expected %0d", top_nb, gmax));
    check(cycles == 32'(2 * NBLK + 1), $sformatf("cycles %0d expected %0d", cycles, 2 * NBLK + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
