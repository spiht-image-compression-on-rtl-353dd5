// ll_mean: mean calculation and subtraction for the top LL subband.
//
// While acc_en is high the four lane values are added to a running sum
// (clr restarts it). The mean is the sum divided by the number of LL
// coefficients, 2^LOG2CNT, rounded half up; it is a registered output. In
// the subtraction sweep each lane value minus the mean is returned on sub_y
// (combinational), saturated to 16 bits. The document states that the LL
// mean is computed and subtracted; the rounding, saturation and the two
// sweeps are this design's choices.
module ll_mean
  import spiht_pkg::*;
#(
  parameter int LOG2CNT = 6          // log2 of LL coefficient count (8x8)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr,
  input  logic                          acc_en,
  input  logic [LANES-1:0][COEF_W-1:0]  acc_x,
  output coef_t                         mean,
  input  logic [LANES-1:0][COEF_W-1:0]  sub_x,
  output logic [LANES-1:0][COEF_W-1:0]  sub_y
);
  localparam int SUM_W = COEF_W + LOG2CNT + 2;
  logic signed [SUM_W-1:0] sum, sum_nx, diff;

  always_comb begin
    sum_nx = sum;
    for (int i = 0; i < LANES; i++) sum_nx += SUM_W'($signed(acc_x[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      mean <= '0;
    end else if (clr) begin
      sum  <= '0;
    end else if (acc_en) begin
      sum  <= sum_nx;
      mean <= COEF_W'((sum_nx + (SUM_W'(1) <<< (LOG2CNT - 1))) >>> LOG2CNT);
    end
  end

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      diff = SUM_W'($signed(sub_x[i])) - SUM_W'(mean);
      if (diff > SUM_W'(32767))       sub_y[i] = 16'h7fff;
      else if (diff < -SUM_W'(32768)) sub_y[i] = 16'h8000;
      else                            sub_y[i] = COEF_W'(diff);
    end
  end
endmodule
