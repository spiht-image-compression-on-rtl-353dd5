// dwt_row_filter: one row lane of the folded DWT: boundary reflection, the
// 9/7 low-pass and high-pass filters, and Variable Fixed-Point scaling.
//
// A row of M samples arrives one per step, followed by four flush steps
// (in_c counts 0 .. M+3). A nine-sample window holds the newest samples; at
// step c >= 4 the unit produces output position n = c-4, whose taps
// x[n-4..n+4] are picked from the window. Taps beyond either end of the row
// are taken by whole-sample symmetric reflection (x[-k] = x[k],
// x[M-1+k] = x[M-1-k]), so the flush steps need no real data. Even n gives a
// low-pass coefficient, odd n a high-pass one; symmetric taps are pre-added so
// five multipliers serve both filters. The result is scaled by vfp_scale
// with shift 14 (row pass) or 15 (column pass).
//
// Timing: out_valid, out_n and out_y appear one clock after the step that
// completes them. The document names the blocks (reflection, low pass, high
// pass, scaling per row, four rows in parallel) and the 9/7 filter set; the
// windowed reflection and pre-add structure are this design's own.
module dwt_row_filter
  import spiht_pkg::*;
#(
  parameter int LOG2N = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_step,         // one sample or flush step
  input  logic [LOG2N:0]    in_c,            // step index within the row
  input  logic [LOG2N:0]    in_m,            // row length M (>= 8)
  input  coef_t             in_x,            // sample x[in_c] (ignored when flushing)
  input  logic              in_colpass,      // 0: row pass, 1: column pass
  output logic              out_valid,
  output logic [LOG2N:0]    out_n,           // output position 0..M-1
  output coef_t             out_y,
  output logic              out_ovf
);
  coef_t win [9];                       // win[8] newest
  coef_t nw  [9];                       // window including this step's sample
  coef_t tap [9];                       // tap[j+4] = x[n+j] after reflection
  logic signed [LOG2N+1:0] n, m, ml;
  logic signed [ACC_W-1:0] acc;
  logic signed [16:0]      pair [5];
  logic                    odd;
  coef_t                   y;
  logic                    ovf;

  always_comb begin
    for (int k = 0; k < 8; k++) nw[k] = win[k+1];
    nw[8] = (in_c < in_m) ? in_x : '0;
    n  = $signed({1'b0, in_c}) - 4;
    ml = $signed({1'b0, in_m}) - 1;
    for (int j = -4; j <= 4; j++) begin
      m = n + (LOG2N+2)'(j);
      if (m < 0) m = -m;
      if (m > ml) m = 2*ml - m;
      tap[j+4] = nw[4 + m - n];
    end
    odd = n[0];
    pair[0] = 17'(tap[4]);
    for (int k = 1; k <= 4; k++) pair[k] = 17'(tap[4+k]) + 17'(tap[4-k]);
    acc = '0;
    for (int k = 0; k <= 4; k++)
      acc += ACC_W'(pair[k]) * ACC_W'(odd ? G97[k] : H97[k]);
  end

  vfp_scale u_scale (
    .acc   (acc),
    .shift (in_colpass ? 5'd15 : 5'd14),
    .y     (y),
    .ovf   (ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 9; k++) win[k] <= '0;
      out_valid <= 1'b0;
      out_n     <= '0;
      out_y     <= '0;
      out_ovf   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_ovf   <= 1'b0;
      if (in_step) begin
        for (int k = 0; k < 9; k++) win[k] <= nw[k];
        if (in_c >= 4) begin
          out_valid <= 1'b1;
          out_n     <= in_c - 4;
          out_y     <= y;
          out_ovf   <= ovf;
        end
      end
    end
  end
endmodule
