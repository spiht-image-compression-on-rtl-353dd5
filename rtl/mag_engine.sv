// mag_engine: the maximum-magnitude phase.
//
// How it works. The spatial orientation trees are walked depth first, so
// that a block is visited only after the four blocks holding its
// coefficients' children. Within each of the three detail bands (HL, LH,
// HH) the walk counts through the finest-level blocks in Morton order;
// after a block whose Morton index ends in base-4 digit 3 (the last of four
// siblings) it climbs to the parent block, and keeps climbing while that is
// again a last sibling. Each finished block pushes the bit lengths of (S) its
// whole tree's largest magnitude and (E) the largest below its own four
// coefficients onto a four-entry stack for its level; the parent reads its
// four children's entries from there: child i gives d_nb[i] = S and
// l_nb[i] = E. The coarsest detail blocks also save their entries in a small
// root table; after the three bands the 2x2 blocks of the top LL band are
// visited, coefficient 1/2/3 taking its children from the HL/LH/HH block at
// the same place (coefficient 0 has none). Magnitudes are compared in the
// common format (level shift applied).
//
// Each block is written as one record to the record memory at
// base(level, band) + Morton index, with the root blocks first and then the
// levels from coarsest to finest, bands HL, LH, HH: the coding phase then
// reads the records in address order, highest level first, Morton order
// within a band.
//
// Timing. Two 16-bit coefficients are read per clock (a 32-bit port), the
// upper half of a block then the lower half, overlapped with finishing the
// previous block, so a block takes 2 clocks: N^2/2 clocks per image plus 2.
// Read data are expected one clock after rd_en.
//
// From the document: depth-first traversal, half a block per read, a stack
// of the four most recent blocks of each level, Morton order per level, one
// memory area per level, 1/2 clock per pixel. This design's choices: reading
// both halves on the way up rather than one on the way down, storing bit
// lengths, the band-major record layout and the root table.
module mag_engine
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
  output logic [NB_W-1:0]               top_nb,     // bit length of the largest coefficient
  output logic [31:0]                   cycles,
  output logic [1:0]                    rd_en,
  output logic [1:0][LOG2N-1:0]         rd_row,
  output logic [1:0][LOG2N-1:0]         rd_col,
  input  logic [1:0][COEF_W-1:0]        rd_data,
  output logic                          wr_en,
  output logic [2*LOG2N-3:0]            wr_addr,
  output blk_rec_t                      wr_data
);
  localparam int N     = 1 << LOG2N;
  localparam int LOG2R = LOG2N - LEVELS;
  localparam int R     = 1 << LOG2R;
  localparam int NROOT = (R / 2) * (R / 2);
  localparam int JW    = 2*LOG2N - 4;          // Morton index width
  localparam int AW    = 2*LOG2N - 2;
  localparam int RIW   = (NROOT > 1) ? $clog2(NROOT) : 1;
  localparam int SW    = (LEVELS > 1) ? $clog2(LEVELS) : 1;   // stack level index width

  typedef struct packed {
    logic          root;
    logic [2:0]    lvl;
    logic [1:0]    d;
    logic [JW-1:0] j;
  } blk_t;

  typedef struct packed {
    logic [NB_W-1:0] s;
    logic [NB_W-1:0] e;
  } st_t;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_TAIL} state_t;
  state_t state;

  blk_t          cur, fin, nxt;
  logic          ph, fin_v, cur_last, nxt_last;
  logic [JW-1:0] k0, k0_nx;
  logic [1:0][COEF_W-1:0] top_q;

  st_t stack [LEVELS][4];
  st_t rootst [3][NROOT];

  function automatic logic [AW-1:0] nblk(input logic [2:0] l);
    return AW'((N >> (l + 2)) * (N >> (l + 2)));
  endfunction

  function automatic int unsigned nblk_full(input logic [2:0] l);
    return (N >> (l + 2)) * (N >> (l + 2));
  endfunction

  // ---------- traversal: the block after cur ----------
  always_comb begin
    nxt = cur; k0_nx = k0; nxt_last = 1'b0;
    if (cur.root) begin
      nxt.j = cur.j + 1;
      nxt_last = (cur.j + 1 == JW'(NROOT - 1));
    end else if (cur.lvl < 3'(LEVELS - 1) && cur.j[1:0] == 2'd3) begin
      nxt.lvl = cur.lvl + 1;
      nxt.j   = cur.j >> 2;
    end else if (32'(k0) != nblk_full(0) - 1) begin
      nxt.lvl = '0; nxt.j = k0 + 1; k0_nx = k0 + 1;
    end else if (cur.d != 2'd2) begin
      nxt.lvl = '0; nxt.d = cur.d + 1; nxt.j = '0; k0_nx = '0;
    end else begin
      nxt.root = 1'b1; nxt.lvl = 3'(LEVELS - 1); nxt.d = '0; nxt.j = '0;
      nxt_last = (NROOT == 1);
    end
  end

  // ---------- read address of the current block ----------
  logic [LOG2N-1:0] r0, c0, bsz;
  always_comb begin
    bsz = LOG2N'(N >> (cur.lvl + 1));
    r0  = LOG2N'({morton_y(20'(cur.j)), 1'b0});
    c0  = LOG2N'({morton_x(20'(cur.j)), 1'b0});
    if (!cur.root) begin
      if (cur.d != 2'd1) c0 = c0 + bsz;   // HL, HH
      if (cur.d != 2'd0) r0 = r0 + bsz;   // LH, HH
    end
    for (int i = 0; i < 2; i++) begin
      rd_en[i]  = (state == S_RUN);
      rd_row[i] = r0 + LOG2N'(ph);
      rd_col[i] = c0 + LOG2N'(i);
    end
  end

  // ---------- finish a block: maxima and record ----------
  blk_rec_t         rec;
  st_t              res;
  logic [NB_W-1:0]  mnb [4];
  logic [NB_W-1:0]  gmax;
  always_comb begin
    rec = '0;
    rec.coef[0] = top_q[0];
    rec.coef[1] = top_q[1];
    rec.coef[2] = rd_data[0];
    rec.coef[3] = rd_data[1];
    rec.is_root = fin.root;
    rec.level   = fin.lvl;
    for (int i = 0; i < 4; i++) begin
      mnb[i] = nbits(common_mag(rec.coef[i], fin.lvl));
      if (fin.root) begin
        rec.has_d[i] = (i != 0);
        rec.has_l[i] = (i != 0) && (LEVELS >= 2);
        if (i != 0) begin
          rec.d_nb[i] = rootst[i-1][RIW'(fin.j)].s;
          rec.l_nb[i] = rootst[i-1][RIW'(fin.j)].e;
        end
      end else begin
        rec.has_d[i] = (fin.lvl >= 1);
        rec.has_l[i] = (fin.lvl >= 2);
        if (fin.lvl >= 1) begin
          rec.d_nb[i] = stack[fin.lvl - 1][i].s;
          rec.l_nb[i] = stack[fin.lvl - 1][i].e;
        end
      end
    end
    res = '0;
    gmax = top_nb;
    for (int i = 0; i < 4; i++) begin
      if (mnb[i] > res.s)         res.s = mnb[i];
      if (rec.d_nb[i] > res.s)    res.s = rec.d_nb[i];
      if (rec.d_nb[i] > res.e)    res.e = rec.d_nb[i];
      if (mnb[i] > gmax)          gmax  = mnb[i];
    end
    rec.p_nb = res.s;
  end

  assign wr_en   = fin_v && (ph == 1'b0);
  assign wr_data = rec;
  always_comb begin
    if (fin.root) wr_addr = AW'(fin.j);
    else          wr_addr = nblk(fin.lvl) * AW'({1'b0, fin.d} + 3'd1) + AW'(fin.j);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ph <= 1'b0; fin_v <= 1'b0; cur <= '0; fin <= '0; k0 <= '0;
      cur_last <= 1'b0; top_q <= '0; top_nb <= '0; done <= 1'b0; cycles <= '0;
      for (int l = 0; l < LEVELS; l++) for (int i = 0; i < 4; i++) stack[l][i] <= '0;
      for (int d = 0; d < 3; d++) for (int i = 0; i < NROOT; i++) rootst[d][i] <= '0;
    end else begin
      done <= 1'b0;
      if (busy) cycles <= cycles + 1;
      // finish the previous block (its lower half arrives now)
      if (wr_en) begin
        top_nb <= gmax;
        if (!fin.root) begin
          stack[SW'(fin.lvl)][fin.j[1:0]] <= res;
          if (fin.lvl == 3'(LEVELS - 1)) rootst[fin.d][RIW'(fin.j)] <= res;
        end
        fin_v <= 1'b0;
      end
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN; ph <= 1'b0; cycles <= '0; top_nb <= '0;
          cur <= '{root: (LEVELS == 0), lvl: '0, d: '0, j: '0}; k0 <= '0;
          cur_last <= 1'b0;
        end
        S_RUN: begin
          if (ph == 1'b0) begin
            ph <= 1'b1;
          end else begin
            top_q <= rd_data;  // upper half read in the previous clock
            ph    <= 1'b0;
            fin   <= cur;
            fin_v <= 1'b1;
            if (cur_last) state <= S_TAIL;
            else begin
              cur <= nxt; k0 <= k0_nx; cur_last <= nxt_last;
            end
          end
        end
        S_TAIL: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
