// dwt_write_sel: data selection and write address logic of the DWT phase.
//
// The four row lanes of a row group g deliver output position n together.
// Low-pass outputs (even n) go to transposed row n/2, high-pass outputs
// (odd n) to transposed row M/2 + (n-1)/2; lane i always goes to column
// 4g+i. Writing the rows as columns mirrors the image about its diagonal,
// so the next pass, reading rows again, filters the other dimension; this
// is the document's folding scheme. The four writes share one transposed
// row and land on four adjacent columns. Combinational. The row sum is one
// bit wider than an address but never exceeds M-1.
module dwt_write_sel
  import spiht_pkg::*;
#(
  parameter int LOG2N = 9
) (
  input  logic                          in_valid,
  input  logic [LOG2N:0]                in_n,
  input  logic [LOG2N:0]                in_m,
  input  logic [LOG2N-3:0]              in_g,
  input  logic [LANES-1:0][COEF_W-1:0]  in_y,
  output logic [LANES-1:0]              wr_en,
  output logic [LANES-1:0][LOG2N-1:0]   wr_row,
  output logic [LANES-1:0][LOG2N-1:0]   wr_col,
  output logic [LANES-1:0][COEF_W-1:0]  wr_data
);
  logic [LOG2N:0] row;
  always_comb begin
    row = in_n[0] ? (in_m >> 1) + (in_n >> 1) : (in_n >> 1);
    for (int i = 0; i < LANES; i++) begin
      wr_en[i]   = in_valid;
      wr_row[i]  = row[LOG2N-1:0];
      wr_col[i]  = {in_g, 2'(i)};
      wr_data[i] = in_y[i];
    end
  end
endmodule
