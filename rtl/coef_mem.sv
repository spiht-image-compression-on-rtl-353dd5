// coef_mem: one 64-bit coefficient memory port with its lane crossbar.
//
// Holds an N x N array of 16-bit coefficients and moves four of them per
// clock, as a 64-bit board memory port does. The array is split into four
// banks with a skewed mapping, bank = (row + col) mod 4, word = row*N/4 +
// col/4. With that mapping four vertically adjacent pixels (the DWT read of
// four rows) and four horizontally adjacent pixels (the transposed DWT
// write) both fall into four different banks, so both access patterns take
// one cycle. The crossbar routes each lane to its bank and back. The skewed
// banking is this design's choice; the document gives only the 64-bit port,
// four rows per access and the transposed write.
//
// Interface: four read lanes (rd_en, rd_row, rd_col) return rd_data one
// clock later; four write lanes write on the clock edge. Enabled lanes of
// one port must hit different banks (checked by assertions). The two low
// column bits select the bank only, so the word address leaves them out.
module coef_mem
  import spiht_pkg::*;
#(
  parameter int LOG2N = 9
) (
  input  logic                           clk,
  input  logic [LANES-1:0]               rd_en,
  input  logic [LANES-1:0][LOG2N-1:0]    rd_row,
  input  logic [LANES-1:0][LOG2N-1:0]    rd_col,
  output logic [LANES-1:0][COEF_W-1:0]   rd_data,
  input  logic [LANES-1:0]               wr_en,
  input  logic [LANES-1:0][LOG2N-1:0]    wr_row,
  input  logic [LANES-1:0][LOG2N-1:0]    wr_col,
  input  logic [LANES-1:0][COEF_W-1:0]   wr_data
);
  localparam int AW    = 2*LOG2N - 2;
  localparam int DEPTH = 1 << AW;

  logic [COEF_W-1:0] bank0 [DEPTH];
  logic [COEF_W-1:0] bank1 [DEPTH];
  logic [COEF_W-1:0] bank2 [DEPTH];
  logic [COEF_W-1:0] bank3 [DEPTH];

  function automatic logic [1:0] bank_of(input logic [LOG2N-1:0] r, input logic [LOG2N-1:0] c);
    return 2'(r + c);
  endfunction

  function automatic logic [AW-1:0] word_of(input logic [LOG2N-1:0] r, input logic [LOG2N-1:0] c);
    return {r, c[LOG2N-1:2]};
  endfunction

  // bank-side view of the crossbar
  logic [3:0]             b_re, b_we;
  logic [3:0][AW-1:0]     b_ra, b_wa;
  logic [3:0][COEF_W-1:0] b_wd, b_rd;
  logic [LANES-1:0][1:0]  lane_bank_q;

  always_comb begin
    b_re = '0; b_we = '0; b_ra = '0; b_wa = '0; b_wd = '0;
    for (int l = LANES-1; l >= 0; l--) begin
      if (rd_en[l]) begin
        b_re[bank_of(rd_row[l], rd_col[l])] = 1'b1;
        b_ra[bank_of(rd_row[l], rd_col[l])] = word_of(rd_row[l], rd_col[l]);
      end
      if (wr_en[l]) begin
        b_we[bank_of(wr_row[l], wr_col[l])] = 1'b1;
        b_wa[bank_of(wr_row[l], wr_col[l])] = word_of(wr_row[l], wr_col[l]);
        b_wd[bank_of(wr_row[l], wr_col[l])] = wr_data[l];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (b_we[0]) bank0[b_wa[0]] <= b_wd[0];
    if (b_we[1]) bank1[b_wa[1]] <= b_wd[1];
    if (b_we[2]) bank2[b_wa[2]] <= b_wd[2];
    if (b_we[3]) bank3[b_wa[3]] <= b_wd[3];
    if (b_re[0]) b_rd[0] <= bank0[b_ra[0]];
    if (b_re[1]) b_rd[1] <= bank1[b_ra[1]];
    if (b_re[2]) b_rd[2] <= bank2[b_ra[2]];
    if (b_re[3]) b_rd[3] <= bank3[b_ra[3]];
    for (int l = 0; l < LANES; l++) lane_bank_q[l] <= bank_of(rd_row[l], rd_col[l]);
  end

  always_comb
    for (int l = 0; l < LANES; l++) rd_data[l] = b_rd[lane_bank_q[l]];

  // enabled lanes of one port never share a bank
  for (genvar a = 0; a < LANES; a++) begin : g_chk
    for (genvar b = a + 1; b < LANES; b++) begin : g_pair
      assert property (@(posedge clk) !(rd_en[a] && rd_en[b] &&
          bank_of(rd_row[a], rd_col[a]) == bank_of(rd_row[b], rd_col[b])))
        else $error("coef_mem: read lanes %0d and %0d share a bank", a, b);
      assert property (@(posedge clk) !(wr_en[a] && wr_en[b] &&
          bank_of(wr_row[a], wr_col[a]) == bank_of(wr_row[b], wr_col[b])))
        else $error("coef_mem: write lanes %0d and %0d share a bank", a, b);
    end
  end
endmodule
