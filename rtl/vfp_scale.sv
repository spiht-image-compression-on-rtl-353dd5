// vfp_scale: Variable Fixed-Point scaling of one filter output.
//
// The filter accumulator holds a coefficient with FRAC_Q+extra fraction bits.
// This unit divides by 2^shift with round-half-up, then saturates to the
// 16-bit stored word and raises ovf when saturation was needed. The shift
// picks the target format: shift = 14 keeps the input format (first, row
// pass of a level), shift = 15 drops one fraction bit (second, column pass),
// which is how every wavelet level gains one integer bit, as the published
// format table requires. Flagging and truncating overflow follows the
// document; round-half-up and saturation (rather than wrap) are this design's
// choices. Purely combinational.
module vfp_scale
  import spiht_pkg::*;
#(
  parameter int IN_W = ACC_W
) (
  input  logic signed [IN_W-1:0]   acc,
  input  logic [4:0]               shift,   // 1..31
  output logic signed [COEF_W-1:0] y,
  output logic                     ovf
);
  logic signed [IN_W-1:0] rounded;
  localparam logic signed [IN_W-1:0] MAXV = IN_W'(2**(COEF_W-1) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(2**(COEF_W-1));

  always_comb begin
    rounded = (acc + (IN_W'(1) <<< (shift - 5'd1))) >>> shift;
    ovf = 1'b0;
    if (rounded > MAXV) begin
      y = COEF_W'(MAXV);
      ovf = 1'b1;
    end else if (rounded < MINV) begin
      y = COEF_W'(MINV);
      ovf = 1'b1;
    end else begin
      y = COEF_W'(rounded);
    end
  end
endmodule
