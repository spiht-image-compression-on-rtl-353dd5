// tb_spiht_engine: the coding phase on a 32x32, two-level transform with
// 4-word FIFOs. The records of a transformed random image are built by the
// reference model and written into the two 64-bit record memories; the
// engine codes them into two word memories. Every stream length and word is
// compared with the reference Fixed Order SPIHT streams; the coder must have
// stalled, and its clock count must be one per block plus the stalls plus
// the flush and drain tail.
module tb_spiht_engine;
  import spiht_pkg::*;
  localparam int LOG2N = 5, LEVELS = 2, DEPTH = 4;
`include "spiht_ref.svh"
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  always #5 clk = ~clk;
  logic [31:0] cycles, stalls, len_bits;
  logic rre, w1e, w2e;
  logic [2*LOG2N-3:0] rra;
  blk_rec_t rrd, ld_d = '0;
  logic [2*LOG2N+2:0] w1a;
  logic [2*LOG2N-1:0] w2a;
  logic [31:0] w1d, w2d;
  logic [6:0] len_sel = '0;
  logic ld = 0;
  logic [2*LOG2N-3:0] ld_a = '0;
  logic [31:0] m1 [1 << (2*LOG2N+3)];
  logic [31:0] m2 [1 << (2*LOG2N)];

  sram #(.W(64), .AW(2*LOG2N-2)) u_lo (.clk, .rd_en(rre), .rd_addr(rra), .rd_data(rrd[63:0]),
    .wr_en(ld), .wr_addr(ld_a), .wr_data(ld_d[63:0]));
  sram #(.W(64), .AW(2*LOG2N-2)) u_hi (.clk, .rd_en(rre), .rd_addr(rra), .rd_data(rrd[127:64]),
    .wr_en(ld), .wr_addr(ld_a), .wr_data(ld_d[127:64]));
  spiht_engine #(.LOG2N(LOG2N), .DEPTH(DEPTH)) dut (.clk, .rst_n, .start, .busy, .done, .cycles,
    .stall_cycles(stalls), .rd_en(rre), .rd_addr(rra), .rd_data(rrd),
    .w1_en(w1e), .w1_addr(w1a), .w1_data(w1d), .w2_en(w2e), .w2_addr(w2a), .w2_data(w2d),
    .len_sel, .len_bits);

  always @(posedge clk) begin
    if (w1e) m1[w1a] <= w1d;
    if (w2e) m2[w2a] <= w2d;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_init();
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) img[r][c] = $urandom_range(0, 255);
    ref_dwt();
    ref_code();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < NBLK; k++) begin
      int r0, c0; bit root;
      blk_pos(k, r0, c0, root);
      ld <= 1; ld_a <= (2*LOG2N-2)'(k); ld_d <= ref_rec(r0, c0, root);
      @(posedge clk);
    end
    ld <= 0;
    start <= 1; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    @(posedge clk);
    for (int k = 0; k < 66; k++) begin
      len_sel <= 7'(k); @(posedge clk); #1;
      check(len_bits == 32'(q[k].size()), $sformatf("stream %0d: %0d bits, expected %0d", k, len_bits, q[k].size()));
      for (int w = 0; w < (q[k].size() + 31) / 32; w++) begin
        logic [31:0] e, g;
        e = '0;
        for (int b = 0; b < 32; b++) if (32 * w + b < q[k].size()) e[31 - b] = q[k][32 * w + b];
        g = (k < 44) ? m1[k * (NBLK / 2) + w] : m2[(k - 44) * (NBLK / 8) + w];
        check(g == e, $sformatf("stream %0d word %0d: %h expected %h", k, w, g, e));
      end
    end
    check(stalls > 0, "coder never stalled");
    check(cycles >= 32'(NBLK) + stalls + 2 && cycles <= 32'(NBLK) + stalls + 2 + 66 * DEPTH,
          $sformatf("cycles %0d for %0d blocks, %0d stalls", cycles, NBLK, stalls));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
