// spiht_top: SPIHT image compression engine, wavelet phase, magnitude phase
// and coding phase joined through switched memories.
//
// How it works. The host writes an N x N 8-bit image into coefficient
// memory A (one pixel per clock, stored as pixel * 2^6, the image's
// Variable Fixed-Point format) and pulses start. The sequencer then runs the
// three phases one after another, switching the memory crossbar at each
// step: dwt_engine transforms A in place with B as scratch; mag_engine reads
// A and writes one 128-bit record per 2x2 block into the two 64-bit record
// memories; spiht_engine reads the records and writes the coded words into
// bit memory 1 (LIP/LIS streams) and bit memory 2 (LSP streams). done pulses
// at the end; the host then reads the coded words, the 66 stream lengths,
// the LL mean, the top bit length and the status counters. While idle the
// host may also read the transform back from memory A.
//
// The document places each phase in its own FPGA, with the board's shared
// memories switched between them by a crossbar, so three images can be in
// flight at once. Here the phases share one clock and run in sequence on one
// image; the crossbar is the memory multiplexing below. The PCI host link
// is replaced by plain load/read ports.
//
// Timing, phase by phase: about 2/3 N^2, N^2/2 and N^2/4 clocks (plus stall
// clocks of the coder), counted in dwt_cycles, mag_cycles, spiht_cycles.
// The assertions sample rst_n on the clock (disable iff) while the
// registers reset asynchronously; lint notes the two uses of rst_n.
module spiht_top
  import spiht_pkg::*;
#(
  parameter int LOG2N  = 9,
  parameter int LEVELS = LOG2N - 3,
  parameter int DEPTH  = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // image load and transform read-back (idle only)
  input  logic                    host_we,
  input  logic [LOG2N-1:0]        host_row,
  input  logic [LOG2N-1:0]        host_col,
  input  logic [7:0]              host_pix,
  input  logic                    host_crd_en,
  output logic [COEF_W-1:0]       host_crd_data,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic [1:0]              phase,        // 0 host, 1 DWT, 2 magnitude, 3 SPIHT
  // coded output
  input  logic                    host_brd_en,
  input  logic                    host_brd_port, // 0: LIP/LIS memory, 1: LSP memory
  input  logic [2*LOG2N+2:0]      host_brd_addr,
  output logic [WORD_W-1:0]       host_brd_data,
  input  logic [6:0]              len_sel,
  output logic [31:0]             len_bits,
  // header and status
  output coef_t                   ll_mean_value,
  output logic [NB_W-1:0]         top_nb,
  output logic                    overflow,
  output logic [31:0]             dwt_cycles,
  output logic [31:0]             mag_cycles,
  output logic [31:0]             spiht_cycles,
  output logic [31:0]             stall_cycles
);
  localparam int RAW = 2*LOG2N - 2;
  localparam int A1W = 2*LOG2N + 3;
  localparam int A2W = 2*LOG2N;

  // ---------------- sequencer ----------------
  logic dwt_start, dwt_busy, dwt_done;
  logic mag_start, mag_busy, mag_done;
  logic sp_start,  sp_busy,  sp_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 2'd0; dwt_start <= 1'b0; mag_start <= 1'b0; sp_start <= 1'b0; done <= 1'b0;
    end else begin
      dwt_start <= 1'b0; mag_start <= 1'b0; sp_start <= 1'b0; done <= 1'b0;
      case (phase)
        2'd0: if (start) begin phase <= 2'd1; dwt_start <= 1'b1; end
        2'd1: if (dwt_done) begin phase <= 2'd2; mag_start <= 1'b1; end
        2'd2: if (mag_done) begin phase <= 2'd3; sp_start <= 1'b1; end
        2'd3: if (sp_done)  begin phase <= 2'd0; done <= 1'b1; end
      endcase
    end
  end
  assign busy = (phase != 2'd0);

  // ---------------- coefficient memories ----------------
  logic [LANES-1:0]              a_re, a_we, b_re, b_we;
  logic [LANES-1:0][LOG2N-1:0]   a_rr, a_rc, a_wr, a_wc, b_rr, b_rc, b_wr, b_wc;
  logic [LANES-1:0][COEF_W-1:0]  a_rd, a_wd, b_rd, b_wd;

  logic [LANES-1:0]              d_are, d_awe;
  logic [LANES-1:0][LOG2N-1:0]   d_arr, d_arc, d_awr, d_awc;
  logic [LANES-1:0][COEF_W-1:0]  d_awd;
  logic [1:0]                    m_re;
  logic [1:0][LOG2N-1:0]         m_rr, m_rc;

  coef_mem #(.LOG2N(LOG2N)) u_mem_a (
    .clk(clk), .rd_en(a_re), .rd_row(a_rr), .rd_col(a_rc), .rd_data(a_rd),
    .wr_en(a_we), .wr_row(a_wr), .wr_col(a_wc), .wr_data(a_wd));
  coef_mem #(.LOG2N(LOG2N)) u_mem_b (
    .clk(clk), .rd_en(b_re), .rd_row(b_rr), .rd_col(b_rc), .rd_data(b_rd),
    .wr_en(b_we), .wr_row(b_wr), .wr_col(b_wc), .wr_data(b_wd));

  // crossbar for memory A
  always_comb begin
    a_re = '0; a_rr = '0; a_rc = '0; a_we = '0; a_wr = '0; a_wc = '0; a_wd = '0;
    case (phase)
      2'd1: begin
        a_re = d_are; a_rr = d_arr; a_rc = d_arc;
        a_we = d_awe; a_wr = d_awr; a_wc = d_awc; a_wd = d_awd;
      end
      2'd2: begin
        a_re[1:0] = m_re; a_rr[1:0] = m_rr; a_rc[1:0] = m_rc;
      end
      default: begin
        a_re[0] = host_crd_en; a_rr[0] = host_row; a_rc[0] = host_col;
        a_we[0] = host_we && (phase == 2'd0);
        a_wr[0] = host_row; a_wc[0] = host_col;
        a_wd[0] = {2'b00, host_pix, 6'b0};
      end
    endcase
  end
  assign host_crd_data = a_rd[0];

  // ---------------- wavelet phase ----------------
  dwt_engine #(.LOG2N(LOG2N), .LEVELS(LEVELS)) u_dwt (
    .clk(clk), .rst_n(rst_n), .start(dwt_start), .busy(dwt_busy), .done(dwt_done),
    .ll_mean_value(ll_mean_value), .overflow(overflow), .cycles(dwt_cycles),
    .a_rd_en(d_are), .a_rd_row(d_arr), .a_rd_col(d_arc), .a_rd_data(a_rd),
    .a_wr_en(d_awe), .a_wr_row(d_awr), .a_wr_col(d_awc), .a_wr_data(d_awd),
    .b_rd_en(b_re), .b_rd_row(b_rr), .b_rd_col(b_rc), .b_rd_data(b_rd),
    .b_wr_en(b_we), .b_wr_row(b_wr), .b_wr_col(b_wc), .b_wr_data(b_wd));

  // ---------------- magnitude phase ----------------
  logic             rec_we, rec_re;
  logic [RAW-1:0]   rec_wa, rec_ra;
  blk_rec_t         rec_wd, rec_rd;

  mag_engine #(.LOG2N(LOG2N), .LEVELS(LEVELS)) u_mag (
    .clk(clk), .rst_n(rst_n), .start(mag_start), .busy(mag_busy), .done(mag_done),
    .top_nb(top_nb), .cycles(mag_cycles),
    .rd_en(m_re), .rd_row(m_rr), .rd_col(m_rc), .rd_data(a_rd[1:0]),
    .wr_en(rec_we), .wr_addr(rec_wa), .wr_data(rec_wd));

  sram #(.W(64), .AW(RAW)) u_rec_lo (
    .clk(clk), .rd_en(rec_re), .rd_addr(rec_ra), .rd_data(rec_rd[63:0]),
    .wr_en(rec_we), .wr_addr(rec_wa), .wr_data(rec_wd[63:0]));
  sram #(.W(64), .AW(RAW)) u_rec_hi (
    .clk(clk), .rd_en(rec_re), .rd_addr(rec_ra), .rd_data(rec_rd[127:64]),
    .wr_en(rec_we), .wr_addr(rec_wa), .wr_data(rec_wd[127:64]));

  // ---------------- coding phase ----------------
  logic                 w1_en, w2_en;
  logic [A1W-1:0]       w1_addr;
  logic [A2W-1:0]       w2_addr;
  logic [WORD_W-1:0]    w1_data, w2_data, bm1_rd, bm2_rd;
  logic                 brd_port_q;

  spiht_engine #(.LOG2N(LOG2N), .DEPTH(DEPTH)) u_spiht (
    .clk(clk), .rst_n(rst_n), .start(sp_start), .busy(sp_busy), .done(sp_done),
    .cycles(spiht_cycles), .stall_cycles(stall_cycles),
    .rd_en(rec_re), .rd_addr(rec_ra), .rd_data(rec_rd),
    .w1_en(w1_en), .w1_addr(w1_addr), .w1_data(w1_data),
    .w2_en(w2_en), .w2_addr(w2_addr), .w2_data(w2_data),
    .len_sel(len_sel), .len_bits(len_bits));

  sram #(.W(WORD_W), .AW(A1W)) u_bits1 (
    .clk(clk), .rd_en(host_brd_en && !host_brd_port), .rd_addr(host_brd_addr), .rd_data(bm1_rd),
    .wr_en(w1_en), .wr_addr(w1_addr), .wr_data(w1_data));
  sram #(.W(WORD_W), .AW(A2W)) u_bits2 (
    .clk(clk), .rd_en(host_brd_en && host_brd_port), .rd_addr(host_brd_addr[A2W-1:0]), .rd_data(bm2_rd),
    .wr_en(w2_en), .wr_addr(w2_addr), .wr_data(w2_data));

  always_ff @(posedge clk) if (host_brd_en) brd_port_q <= host_brd_port;
  assign host_brd_data = brd_port_q ? bm2_rd : bm1_rd;

  // the phase engines only run while the sequencer has handed them the memories
  assert property (@(posedge clk) disable iff (!rst_n) !(dwt_busy && phase != 2'd1));
  assert property (@(posedge clk) disable iff (!rst_n) !(mag_busy && phase != 2'd2));
  assert property (@(posedge clk) disable iff (!rst_n) !(sp_busy  && phase != 2'd3));
endmodule
