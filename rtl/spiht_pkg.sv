// spiht_pkg: types, constants and small functions shared by the SPIHT
// compression engine.
//
// Number formats. Every coefficient is stored as a 16-bit two's-complement
// word in a "Variable Fixed-Point" format: the image itself carries 10
// integer bits (sign included) and 6 fraction bits, wavelet level L carries
// 11+L integer bits and 5-L fraction bits (level 6: 17 integer bits, the
// lowest integer position dropped). These widths follow the published
// allocation table. The coding phase brings every level into one common
// 22-bit magnitude format, value * 2^5, by shifting a level-L magnitude left
// by L; bit plane p of that format is handled by bit-plane unit p (22 units).
//
// Filters. The 9/7 biorthogonal analysis pair, scaled to a DC gain of sqrt(2)
// so that one 2-D level grows the low band by one bit, quantised to 14
// fraction bits (round to nearest). The quantisation is this design's choice.
//
// Block record. The magnitude phase hands one 128-bit record per 2x2 block
// to the coding phase: the four raw coefficients, the block's level and root
// flag, and for every coefficient the bit length (floor(log2)+1, 0 for zero)
// of the largest magnitude in its descendant set D and in its
// grand-descendant set L, plus the bit length of the largest magnitude of the
// whole tree the block heads. Storing bit lengths instead of magnitudes is
// this design's choice: a set is significant at plane p exactly when its bit
// length exceeds p.
package spiht_pkg;

  localparam int COEF_W  = 16;   // stored coefficient width
  localparam int LANES   = 4;    // coefficients per 64-bit memory access
  localparam int PLANES  = 22;   // bit planes of the common format
  localparam int MAG_W   = 22;   // common-format magnitude width
  localparam int NB_W    = 5;    // bit-length field width (0..22)
  localparam int WORD_W  = 32;   // variable-FIFO output word
  localparam int CHUNK_W = 16;   // largest group one block gives one list
  localparam int FRAC_Q  = 14;   // filter coefficient fraction bits
  localparam int ACC_W   = 40;   // filter accumulator width

  typedef logic signed [COEF_W-1:0] coef_t;

  // 9/7 analysis low-pass taps h[0..4] and high-pass taps g[0..3]
  // (sqrt(2) DC gain), times 2^14:
  //   h = 0.852698679, 0.377402856, -0.110624404, -0.023849465, 0.037828456
  //   g = 0.788485616, -0.418092273, -0.040689418, 0.064538883
  localparam logic signed [15:0] H97 [5] = '{16'sd13971, 16'sd6183, -16'sd1812, -16'sd391, 16'sd620};
  localparam logic signed [15:0] G97 [5] = '{16'sd12919, -16'sd6850, -16'sd667, 16'sd1057, 16'sd0};

  typedef struct packed {
    logic [6:0]              pad;
    logic                    is_root;  // block of the top LL band
    logic [2:0]              level;    // wavelet level of the coefficients
    logic [3:0]              has_d;    // coefficient i has offspring
    logic [3:0]              has_l;    // coefficient i has grand-offspring
    logic [NB_W-1:0]         p_nb;     // bit length of max over the block's tree
    logic [3:0][NB_W-1:0]    d_nb;     // bit length of max over D(c_i)
    logic [3:0][NB_W-1:0]    l_nb;     // bit length of max over L(c_i)
    logic [3:0][COEF_W-1:0]  coef;     // raw coefficients: 0=UL 1=UR 2=LL 3=LR
  } blk_rec_t;

  // Number of significant bits of a magnitude; 0 for zero.
  function automatic logic [NB_W-1:0] nbits(input logic [MAG_W-1:0] x);
    logic [NB_W-1:0] r;
    r = '0;
    for (int b = 0; b < MAG_W; b++)
      if (x[b]) r = NB_W'(b + 1);
    return r;
  endfunction

  // Magnitude of a stored coefficient of wavelet level lvl, in the common format.
  function automatic logic [MAG_W-1:0] common_mag(input coef_t c, input logic [2:0] lvl);
    logic [COEF_W:0] a;
    a = c[COEF_W-1] ? (COEF_W+1)'(-$signed({c[COEF_W-1], c})) : (COEF_W+1)'({1'b0, c});
    return MAG_W'(a) << lvl;
  endfunction

  // Morton (Z-order) decode: even bits give x, odd bits give y.
  function automatic logic [9:0] morton_x(input logic [19:0] m);
    logic [9:0] r;
    for (int b = 0; b < 10; b++) r[b] = m[2*b];
    return r;
  endfunction

  function automatic logic [9:0] morton_y(input logic [19:0] m);
    logic [9:0] r;
    for (int b = 0; b < 10; b++) r[b] = m[2*b+1];
    return r;
  endfunction

endpackage
