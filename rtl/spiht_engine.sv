// spiht_engine: the SPIHT coding phase.
//
// How it works. Block records are read one per clock in address order
// (top LL blocks, then levels from coarsest to finest). spiht_shift brings
// the block into the common format, and 22 spiht_bitplane units, one per bit
// plane, compute in parallel the LIP, LIS and LSP groups the block adds to
// each plane. Each of the 66 groups is pushed into its own var_fifo, which
// packs the bits into 32-bit words. Two fifo_sched schedulers pick, every
// clock, the fullest LIP/LIS FIFO for write port 1 and the fullest LSP FIFO
// for write port 2; the word goes to the FIFO's own memory region at the
// next free word of that region (the LIP/LIS and LSP address generators are
// one word counter per FIFO). When any FIFO is close to full (count >=
// DEPTH-2) reading stalls. After the last block every FIFO is flushed and
// drained.
//
// Output layout. Port 1 region k = 2*plane + list (list 0 LIP, 1 LIS) starts
// at word k * NBLK/2; port 2 region = plane starts at plane * NBLK/8, where
// NBLK = N^2/4 blocks; each region is big enough for the largest group
// times NBLK. len_sel 0..43 returns the bit length of port-1 region len_sel,
// 44..65 that of LSP region len_sel-44. A decoder reads, for each plane from
// the top down, the LIP, LIS and LSP streams of that plane.
//
// Timing. One block per clock without stalls (N^2/4 clocks per image),
// record data one clock after rd_en, plus flush and drain at the end.
// From the document: one block per clock, shift, 22 parallel bit-plane
// units, grouping, three variable FIFOs per plane, stall when a FIFO is too
// full, the fullest-FIFO scheduler, two write ports split LIP/LIS vs LSP.
// This design's choices: the stall threshold and the region layout; the
// default DEPTH of 128 words is one 4096-bit block RAM per FIFO, the
// memory the document suggests for FIFOs.
module spiht_engine
  import spiht_pkg::*;
#(
  parameter int LOG2N = 9,
  parameter int DEPTH = 128
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic [31:0]            cycles,
  output logic [31:0]            stall_cycles,
  // record memory (two 64-bit read ports seen as one 128-bit record)
  output logic                   rd_en,
  output logic [2*LOG2N-3:0]     rd_addr,
  input  blk_rec_t               rd_data,
  // write port 1: LIP and LIS words
  output logic                   w1_en,
  output logic [2*LOG2N+2:0]     w1_addr,
  output logic [WORD_W-1:0]      w1_data,
  // write port 2: LSP words
  output logic                   w2_en,
  output logic [2*LOG2N-1:0]     w2_addr,
  output logic [WORD_W-1:0]      w2_data,
  // bit lengths of the 66 streams
  input  logic [6:0]             len_sel,
  output logic [31:0]            len_bits
);
  localparam int NBLK  = 1 << (2*LOG2N - 2);
  localparam int REG1  = NBLK / 2;
  localparam int REG2  = NBLK / 8;
  localparam int N1    = 2 * PLANES;
  localparam int N2    = PLANES;
  localparam int CW    = $clog2(DEPTH + 1);
  localparam int A1W   = 2*LOG2N + 3;
  localparam int A2W   = 2*LOG2N;

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_LAST, S_FLUSH, S_DRAIN} state_t;
  state_t state;

  logic [2*LOG2N-2:0] a;          // next record to read
  logic               v1, stall, flush;
  logic [3:0][MAG_W-1:0] mag;
  logic [3:0]         sign;

  logic [N1-1:0][CHUNK_W-1:0] c1_bits;
  logic [N1-1:0][4:0]         c1_cnt;
  logic [N2-1:0][CHUNK_W-1:0] c2_bits;
  logic [N2-1:0][4:0]         c2_cnt;
  logic [N1-1:0][CW-1:0]      cnt1;
  logic [N2-1:0][CW-1:0]      cnt2;
  logic [N1-1:0][WORD_W-1:0]  word1;
  logic [N2-1:0][WORD_W-1:0]  word2;
  logic [N1-1:0][31:0]        bits1;
  logic [N2-1:0][31:0]        bits2;
  logic [N1-1:0]              pop1;
  logic [N2-1:0]              pop2;
  logic                       s1_v, s2_v;
  logic [$clog2(N1)-1:0]      s1_sel;
  logic [$clog2(N2)-1:0]      s2_sel;
  logic [N1-1:0][A1W-1:0]     wc1;
  logic [N2-1:0][A2W-1:0]     wc2;

  assign busy = (state != S_IDLE);

  // ---------- shift data and the 22 bit-plane units ----------
  spiht_shift u_shift (.rec(rd_data), .mag(mag), .sign(sign));

  for (genvar p = 0; p < PLANES; p++) begin : g_plane
    spiht_bitplane #(.P(p)) u_bp (
      .rec      (rd_data),
      .mag      (mag),
      .sign     (sign),
      .lip_bits (c1_bits[2*p]),
      .lip_cnt  (c1_cnt[2*p]),
      .lis_bits (c1_bits[2*p+1]),
      .lis_cnt  (c1_cnt[2*p+1]),
      .lsp_bits (c2_bits[p]),
      .lsp_cnt  (c2_cnt[p])
    );
  end

  // ---------- variable FIFOs ----------
  for (genvar k = 0; k < N1; k++) begin : g_fifo1
    var_fifo #(.DEPTH(DEPTH)) u_f (
      .clk(clk), .rst_n(rst_n), .clr(start && !busy),
      .push(v1), .in_bits(c1_bits[k]), .in_cnt(c1_cnt[k]), .flush(flush),
      .pop(pop1[k]), .rd_word(word1[k]), .count(cnt1[k]), .bits(bits1[k]));
  end
  for (genvar k = 0; k < N2; k++) begin : g_fifo2
    var_fifo #(.DEPTH(DEPTH)) u_f (
      .clk(clk), .rst_n(rst_n), .clr(start && !busy),
      .push(v1), .in_bits(c2_bits[k]), .in_cnt(c2_cnt[k]), .flush(flush),
      .pop(pop2[k]), .rd_word(word2[k]), .count(cnt2[k]), .bits(bits2[k]));
  end

  // ---------- dynamic scheduling, select and read FIFOs ----------
  fifo_sched #(.NUM(N1), .CW(CW)) u_sched1 (.counts(cnt1), .valid(s1_v), .sel(s1_sel));
  fifo_sched #(.NUM(N2), .CW(CW)) u_sched2 (.counts(cnt2), .valid(s2_v), .sel(s2_sel));

  always_comb begin
    pop1 = '0;
    pop2 = '0;
    pop1[s1_sel] = s1_v;
    pop2[s2_sel] = s2_v;
    w1_en   = s1_v;
    w1_data = word1[s1_sel];
    w1_addr = A1W'(s1_sel) * A1W'(REG1) + wc1[s1_sel];
    w2_en   = s2_v;
    w2_data = word2[s2_sel];
    w2_addr = A2W'(s2_sel) * A2W'(REG2) + wc2[s2_sel];
  end

  // ---------- stall: some FIFO has too little room ----------
  always_comb begin
    stall = 1'b0;
    for (int k = 0; k < N1; k++) if (cnt1[k] >= CW'(DEPTH - 2)) stall = 1'b1;
    for (int k = 0; k < N2; k++) if (cnt2[k] >= CW'(DEPTH - 2)) stall = 1'b1;
  end

  assign rd_en   = (state == S_RUN) && !stall;
  assign rd_addr = (2*LOG2N-2)'(a);
  assign flush   = (state == S_FLUSH);

  always_comb begin
    if (len_sel < 7'(N1))      len_bits = bits1[len_sel[5:0]];
    else if (len_sel < 7'(N1 + N2)) len_bits = bits2[5'(len_sel - 7'(N1))];
    else                       len_bits = '0;
  end

  // ---------- control and address generators ----------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; a <= '0; v1 <= 1'b0; done <= 1'b0;
      cycles <= '0; stall_cycles <= '0; wc1 <= '0; wc2 <= '0;
    end else begin
      done <= 1'b0;
      v1   <= rd_en;
      if (busy) cycles <= cycles + 1;
      if (state == S_RUN && stall) stall_cycles <= stall_cycles + 1;
      if (s1_v) wc1[s1_sel] <= wc1[s1_sel] + 1;
      if (s2_v) wc2[s2_sel] <= wc2[s2_sel] + 1;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN; a <= '0; cycles <= '0; stall_cycles <= '0;
          wc1 <= '0; wc2 <= '0;
        end
        S_RUN: if (rd_en) begin
          a <= a + 1;
          if (a == (2*LOG2N-1)'(NBLK - 1)) state <= S_LAST;
        end
        S_LAST:  state <= S_FLUSH;     // last block is being pushed
        S_FLUSH: state <= S_DRAIN;
        S_DRAIN: if (!s1_v && !s2_v) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
