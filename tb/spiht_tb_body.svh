// Body shared by the end-to-end testbenches of spiht_top. The including
// module defines LOG2N, LEVELS, IMG_KIND, WATCHDOG, the macro TOP_PARAMS
// (the top's parameter list, empty for the defaults) and its own watchdog
// block, and instantiates nothing else. A reference model
// written from the algorithm (integer 9/7 transform, tree maxima by direct
// recursion over coordinates, Fixed Order SPIHT bit rules) is compared
// with everything the engine returns: the transform read back from memory
// A, the LL mean, the top bit length, every stream length and every coded
// word, and the clock counts of each phase.

`include "spiht_ref.svh"

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 host_we = 0, host_crd_en = 0, start = 0;
  logic [LOG2N-1:0]     host_row = '0, host_col = '0;
  logic [7:0]           host_pix = '0;
  logic [15:0]          host_crd_data;
  logic                 busy, done;
  logic [1:0]           phase;
  logic                 host_brd_en = 0, host_brd_port = 0;
  logic [2*LOG2N+2:0]   host_brd_addr = '0;
  logic [31:0]          host_brd_data;
  logic [6:0]           len_sel = '0;
  logic [31:0]          len_bits;
  logic signed [15:0]   ll_mean_value;
  logic [4:0]           top_nb;
  logic                 overflow;
  logic [31:0]          dwt_cycles, mag_cycles, spiht_cycles, stall_cycles;

  spiht_top `TOP_PARAMS dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;



  // ---------------- stimulus ----------------
  int seen_phase [4];
  always @(posedge clk) seen_phase[phase]++;
  int w1_writes = 0, w2_writes = 0;
  always @(posedge clk) begin
    if (dut.w1_en) w1_writes++;
    if (dut.w2_en) w2_writes++;
  end

  initial begin
    int gmax, partial, t0, exp_dwt;
    ref_init();
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int v;
      if (IMG_KIND == 0) v = 128 + ((r * 97 + c * 61) % 64) - 32 + int'($urandom_range(0, 40)) - 20
                             + ((r / 8 + c / 8) % 2) * 30;
      else v = int'($urandom_range(0, 255));
      img[r][c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // load the image
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      host_we <= 1; host_row <= LOG2N'(r); host_col <= LOG2N'(c); host_pix <= 8'(img[r][c]);
      @(posedge clk);
    end
    host_we <= 0;
    ref_dwt();
    ref_code();
    @(posedge clk);
    start <= 1; t0 = cyc;
    @(posedge clk);
    start <= 0;
    while (!done) @(posedge clk);
    $display("clocks: dwt %0d mag %0d spiht %0d (stall %0d), total %0d, pixels %0d",
             dwt_cycles, mag_cycles, spiht_cycles, stall_cycles, cyc - t0, N * N);

    // transform read-back
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      host_crd_en <= 1; host_row <= LOG2N'(r); host_col <= LOG2N'(c);
      @(posedge clk); host_crd_en <= 0; #1;
      @(posedge clk); #1;
      check($signed(host_crd_data) == 16'(X[r][c]),
            $sformatf("coef (%0d,%0d) = %0d, expected %0d", r, c, $signed(host_crd_data), X[r][c]));
    end
    check(ll_mean_value == 16'(mean_ref), $sformatf("LL mean %0d, expected %0d", ll_mean_value, mean_ref));
    gmax = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) if (nb(cmag(r, c)) > gmax) gmax = nb(cmag(r, c));
    check(top_nb == 5'(gmax), $sformatf("top bit length %0d, expected %0d", top_nb, gmax));
    check(!overflow, "no overflow expected on an 8-bit image");

    // stream lengths and words
    partial = 0;
    for (int k = 0; k < 66; k++) begin
      len_sel <= 7'(k);
      @(posedge clk); #1;
      check(len_bits == 32'(q[k].size()), $sformatf("stream %0d length %0d, expected %0d", k, len_bits, q[k].size()));
      if (q[k].size() % 32 != 0) partial++;
      for (int w = 0; w < (q[k].size() + 31) / 32; w++) begin
        logic [31:0] e;
        e = '0;
        for (int b = 0; b < 32; b++) if (32 * w + b < q[k].size()) e[31 - b] = q[k][32 * w + b];
        host_brd_en <= 1;
        host_brd_port <= (k >= 44);
        host_brd_addr <= (k < 44) ? (2*LOG2N+3)'(k * REG1 + w) : (2*LOG2N+3)'((k - 44) * REG2 + w);
        @(posedge clk); host_brd_en <= 0; #1;
        @(posedge clk); #1;
        check(host_brd_data == e, $sformatf("stream %0d word %0d = %h, expected %h", k, w, host_brd_data, e));
      end
    end

    // clock counts: the DWT's own schedule, 2 clocks per block, 1 block per clock
    exp_dwt = 2 * (R / 4) * R + 2;
    for (int l = 0; l < LEVELS; l++) exp_dwt += 2 * (((N >> l) / 4) * ((N >> l) + 4) + 3);
    check(dwt_cycles == 32'(exp_dwt), $sformatf("dwt clocks %0d, expected %0d", dwt_cycles, exp_dwt));
    check(mag_cycles == 32'(2 * NBLK + 1), $sformatf("magnitude clocks %0d, expected %0d", mag_cycles, 2 * NBLK + 1));
    check(spiht_cycles >= 32'(NBLK) + stall_cycles + 2 && spiht_cycles <= 32'(NBLK) + stall_cycles + 2 + 16 * 66,
          $sformatf("spiht clocks %0d for %0d blocks and %0d stalls", spiht_cycles, NBLK, stall_cycles));

    // mechanisms exercised
    $display("mechanisms: stalls %0d, LIP/LIS words %0d, LSP words %0d, flushed partial words %0d,",
             stall_cycles, w1_writes, w2_writes, partial);
    $display("            offspring bits %0d, type-B bits %0d, refinement bits %0d, LL mean %0d, phases %0d/%0d/%0d",
             n_newly, n_typeb, n_refine, mean_ref, seen_phase[1], seen_phase[2], seen_phase[3]);
    check(stall_cycles > 0, "coder never stalled on a full FIFO");
    check(w1_writes > 0 && w2_writes > 0, "a write port was never used");
    check(partial > 0, "no stream ended in a flushed partial word");
    // with a single wavelet level no coefficient has grand-children, so no
    // type-B entry can exist
    check(n_newly > 0 && (n_typeb > 0 || LEVELS < 2) && n_refine > 0, "a SPIHT list case never occurred");
    check(mean_ref != 0, "LL mean subtraction did nothing");
    check(seen_phase[1] > 0 && seen_phase[2] > 0 && seen_phase[3] > 0, "a phase never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
