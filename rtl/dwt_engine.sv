// dwt_engine: the wavelet phase, a folded 2-D discrete wavelet transform.
//
// How it works. Each wavelet level is done in two passes of the same 1-D
// hardware. A pass reads the current M x M low band of its source memory
// four rows at a time (one 64-bit access per column), runs the four rows
// through four dwt_row_filter lanes, and writes each low/high output into the
// destination memory transposed (dwt_write_sel). Pass 0 reads memory A and
// writes B; pass 1 reads B, filters what were the columns, and writes A,
// which restores the orientation. The next level repeats this on the M/2 x
// M/2 low band, until LEVELS levels are done. Last, the mean of the top LL
// band (N/2^LEVELS square) is accumulated and subtracted from it in place
// (ll_mean). Row passes keep the input's fixed-point format; column passes
// drop one fraction bit, giving the Variable Fixed-Point format of the level.
//
// Timing. A row group takes M+4 clocks (M reads, four flush steps for the
// reflected right edge), a pass M/4 groups plus a 3-clock drain, so a level
// takes about M^2/2 clocks and the whole transform about 2/3 N^2. The mean
// sweeps take 2 * (R/4) * R clocks plus drains. cycles counts start to done.
//
// From the document: folding, four rows per 64-bit access, transposed
// writes, the 9/7 filters, Variable Fixed-Point scaling, overflow flagging,
// LL mean subtraction. This design's choices: the flush steps, the drains,
// the two-sweep mean, and LEVELS = LOG2N - 3 (an 8x8 top LL band; seven
// levels for 1024x1024, as the document states). The four lanes step
// together, so only lane 0's valid flag and position are used; lint reports
// the other lanes' copies as unused.
module dwt_engine
  import spiht_pkg::*;
#(
  parameter int LOG2N  = 9,
  parameter int LEVELS = LOG2N - 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output coef_t                         ll_mean_value,
  output logic                          overflow,      // sticky, cleared by start
  output logic [31:0]                   cycles,
  // memory A (image in, transform out)
  output logic [LANES-1:0]              a_rd_en,
  output logic [LANES-1:0][LOG2N-1:0]   a_rd_row,
  output logic [LANES-1:0][LOG2N-1:0]   a_rd_col,
  input  logic [LANES-1:0][COEF_W-1:0]  a_rd_data,
  output logic [LANES-1:0]              a_wr_en,
  output logic [LANES-1:0][LOG2N-1:0]   a_wr_row,
  output logic [LANES-1:0][LOG2N-1:0]   a_wr_col,
  output logic [LANES-1:0][COEF_W-1:0]  a_wr_data,
  // memory B (scratch between the two passes of a level)
  output logic [LANES-1:0]              b_rd_en,
  output logic [LANES-1:0][LOG2N-1:0]   b_rd_row,
  output logic [LANES-1:0][LOG2N-1:0]   b_rd_col,
  input  logic [LANES-1:0][COEF_W-1:0]  b_rd_data,
  output logic [LANES-1:0]              b_wr_en,
  output logic [LANES-1:0][LOG2N-1:0]   b_wr_row,
  output logic [LANES-1:0][LOG2N-1:0]   b_wr_col,
  output logic [LANES-1:0][COEF_W-1:0]  b_wr_data
);
  localparam int N      = 1 << LOG2N;
  localparam int LOG2R  = LOG2N - LEVELS;
  localparam int R      = 1 << LOG2R;

  typedef enum logic [2:0] {S_IDLE, S_PASS, S_DRAIN, S_MACC, S_MSUB, S_MDRAIN} state_t;
  state_t state;

  logic [2:0]        lvl;
  logic              pass;
  logic [LOG2N-3:0]  g;
  logic [LOG2N:0]    c;
  logic [1:0]        drain;
  logic [LOG2N:0]    m;

  // pipeline stage 1: read data present
  logic              s1_step, s1_acc, s1_sub, s1_pass;
  logic [LOG2N:0]    s1_c, s1_m;
  logic [LOG2N-3:0]  s1_g;
  // stage 2: filter outputs present
  logic [LOG2N:0]    s2_m;
  logic [LOG2N-3:0]  s2_g;
  logic              s2_pass;

  logic [LANES-1:0]              f_valid, f_ovf;
  logic [LANES-1:0][LOG2N:0]     f_n;
  logic [LANES-1:0][COEF_W-1:0]  f_y, src_data, sub_y;

  logic [LANES-1:0]              ws_en;
  logic [LANES-1:0][LOG2N-1:0]   ws_row, ws_col;
  logic [LANES-1:0][COEF_W-1:0]  ws_data;

  assign m    = (LOG2N+1)'(N) >> lvl;
  assign busy = (state != S_IDLE);

  // ---------------- read address logic ----------------
  logic rd_issue;
  always_comb begin
    rd_issue = ((state == S_PASS) && (c < m)) || state == S_MACC || state == S_MSUB;
    for (int i = 0; i < LANES; i++) begin
      a_rd_en[i]  = rd_issue && ((state == S_PASS && !pass) || state == S_MACC || state == S_MSUB);
      b_rd_en[i]  = rd_issue && (state == S_PASS && pass);
      a_rd_row[i] = {g, 2'(i)};
      a_rd_col[i] = c[LOG2N-1:0];
      b_rd_row[i] = {g, 2'(i)};
      b_rd_col[i] = c[LOG2N-1:0];
    end
  end

  // ---------------- level calculation and control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; lvl <= '0; pass <= 1'b0; g <= '0; c <= '0; drain <= '0;
      done <= 1'b0; cycles <= '0;
      s1_step <= 1'b0; s1_acc <= 1'b0; s1_sub <= 1'b0; s1_pass <= 1'b0;
      s1_c <= '0; s1_m <= '0; s1_g <= '0;
      s2_m <= '0; s2_g <= '0; s2_pass <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) cycles <= cycles + 1;
      // stage 1
      s1_step <= (state == S_PASS);
      s1_acc  <= (state == S_MACC);
      s1_sub  <= (state == S_MSUB);
      s1_c    <= c;
      s1_m    <= m;
      s1_g    <= g;
      s1_pass <= pass;
      // stage 2
      if (s1_step) begin
        s2_m    <= s1_m;
        s2_g    <= s1_g;
        s2_pass <= s1_pass;
      end
      case (state)
        S_IDLE: if (start) begin
          state <= S_PASS; lvl <= '0; pass <= 1'b0; g <= '0; c <= '0; cycles <= '0;
        end
        S_PASS: begin
          if (c == m + 3) begin
            c <= '0;
            if (g == (LOG2N-2)'(m[LOG2N:2] - 1'b1)) begin
              g <= '0; state <= S_DRAIN; drain <= 2'd2;
            end else g <= g + 1;
          end else c <= c + 1;
        end
        S_DRAIN: begin
          if (drain == 0) begin
            if (!pass) begin
              pass <= 1'b1; state <= S_PASS;
            end else if (lvl == 3'(LEVELS - 1)) begin
              state <= S_MACC;
            end else begin
              pass <= 1'b0; lvl <= lvl + 1; state <= S_PASS;
            end
          end else drain <= drain - 1;
        end
        S_MACC, S_MSUB: begin
          if (c == (LOG2N+1)'(R - 1)) begin
            c <= '0;
            if (g == (LOG2N-2)'(R/4 - 1)) begin
              g <= '0;
              if (state == S_MACC) state <= S_MSUB;
              else begin state <= S_MDRAIN; drain <= 2'd1; end
            end else g <= g + 1;
          end else c <= c + 1;
        end
        S_MDRAIN: begin
          if (drain == 0) begin state <= S_IDLE; done <= 1'b1; end
          else drain <= drain - 1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- four row lanes ----------------
  assign src_data = s1_pass ? b_rd_data : a_rd_data;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    dwt_row_filter #(.LOG2N(LOG2N)) u_row (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_step    (s1_step),
      .in_c       (s1_c),
      .in_m       (s1_m),
      .in_x       (src_data[i]),
      .in_colpass (s1_pass),
      .out_valid  (f_valid[i]),
      .out_n      (f_n[i]),
      .out_y      (f_y[i]),
      .out_ovf    (f_ovf[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overflow <= 1'b0;
    else if (start && !busy) overflow <= 1'b0;
    else if (|f_ovf) overflow <= 1'b1;
  end

  // ---------------- data selection and write address logic ----------------
  dwt_write_sel #(.LOG2N(LOG2N)) u_wsel (
    .in_valid (f_valid[0]),
    .in_n     (f_n[0]),
    .in_m     (s2_m),
    .in_g     (s2_g),
    .in_y     (f_y),
    .wr_en    (ws_en),
    .wr_row   (ws_row),
    .wr_col   (ws_col),
    .wr_data  (ws_data)
  );

  // ---------------- LL subband mean ----------------
  ll_mean #(.LOG2CNT(2*LOG2R)) u_mean (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (start && !busy),
    .acc_en (s1_acc),
    .acc_x  (a_rd_data),
    .mean   (ll_mean_value),
    .sub_x  (a_rd_data),
    .sub_y  (sub_y)
  );

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      b_wr_en[i]   = ws_en[i] && !s2_pass;
      b_wr_row[i]  = ws_row[i];
      b_wr_col[i]  = ws_col[i];
      b_wr_data[i] = ws_data[i];
      if (s1_sub) begin
        a_wr_en[i]   = 1'b1;
        a_wr_row[i]  = {s1_g, 2'(i)};
        a_wr_col[i]  = s1_c[LOG2N-1:0];
        a_wr_data[i] = sub_y[i];
      end else begin
        a_wr_en[i]   = ws_en[i] && s2_pass;
        a_wr_row[i]  = ws_row[i];
        a_wr_col[i]  = ws_col[i];
        a_wr_data[i] = ws_data[i];
      end
    end
  end
endmodule
