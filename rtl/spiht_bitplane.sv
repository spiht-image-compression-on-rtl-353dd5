// spiht_bitplane: Fixed Order SPIHT for one block and one bit plane, with
// the grouping of its output bits.
//
// For bit plane P (threshold 2^P) it computes, from one block alone, the
// bits the block adds to the plane's three lists. A magnitude or set is
// significant at P when its bit length exceeds P; it was significant before
// when its bit length exceeds P+1.
//   active  = root block, or the block's parent set D(parent) is
//             significant (p_nb > P).
//   newly   = not root and D(parent) became significant at this plane
//             (p_nb == P+1): the sorting of the parent's offspring happens
//             now, so the block's four significance bits (each followed by
//             its sign when 1) go to the LIS group.
//   LIP     = active, not newly, coefficient not significant before:
//             significance bit, plus sign when significant.
//   LSP     = coefficient significant before: refinement bit P.
//   LIS     = for a coefficient with offspring, while its set D is not yet
//             found (type A): S_P(D); the entry exists for root blocks from
//             the start and otherwise once the block's own offspring sets
//             are live (max d_nb > P, i.e. L(parent) significant). Once D is
//             significant and grand-offspring exist (type B): S_P(L) until
//             L is found.
// Bits are packed first-bit-most-significant into a chunk with a count:
// LIP 0..8 bits, LIS 0..16, LSP 0..4. The LIS group holds the offspring
// bits of coefficients 0..3, then for each coefficient its type A and type
// B bits. This per-block rule set realises the document's Fixed Order SPIHT
// (fixed block order, same bits per plane as SPIHT); the grouping of a
// block's offspring bits with the block itself rather than with its parent
// is this design's choice. Combinational. The raw coefficients and the
// level in rec are not needed here (they arrive through mag and sign).
module spiht_bitplane
  import spiht_pkg::*;
#(
  parameter int P = 0
) (
  input  blk_rec_t                rec,
  input  logic [3:0][MAG_W-1:0]   mag,
  input  logic [3:0]              sign,
  output logic [CHUNK_W-1:0]      lip_bits,
  output logic [4:0]              lip_cnt,
  output logic [CHUNK_W-1:0]      lis_bits,
  output logic [4:0]              lis_cnt,
  output logic [CHUNK_W-1:0]      lsp_bits,
  output logic [4:0]              lsp_cnt
);
  localparam logic [NB_W-1:0] P0 = NB_W'(P);
  localparam logic [NB_W-1:0] P1 = NB_W'(P + 1);

  logic [NB_W-1:0] mnb [4];
  logic [NB_W-1:0] dmax;
  logic active, newly, sets_live, s;

  always_comb begin
    lip_bits = '0; lip_cnt = '0;
    lis_bits = '0; lis_cnt = '0;
    lsp_bits = '0; lsp_cnt = '0;
    dmax = '0;
    for (int i = 0; i < 4; i++) begin
      mnb[i] = nbits(mag[i]);
      if (rec.has_d[i] && rec.d_nb[i] > dmax) dmax = rec.d_nb[i];
    end
    active    = rec.is_root || (rec.p_nb > P0);
    newly     = !rec.is_root && (rec.p_nb == P1);
    sets_live = rec.is_root || (dmax > P0);
    // coefficient bits
    for (int i = 0; i < 4; i++) begin
      s = (mnb[i] > P0);
      if (active) begin
        if (newly) begin
          lis_bits = {lis_bits[CHUNK_W-2:0], s}; lis_cnt++;
          if (s) begin lis_bits = {lis_bits[CHUNK_W-2:0], sign[i]}; lis_cnt++; end
        end else if (mnb[i] <= P1) begin
          lip_bits = {lip_bits[CHUNK_W-2:0], s}; lip_cnt++;
          if (s) begin lip_bits = {lip_bits[CHUNK_W-2:0], sign[i]}; lip_cnt++; end
        end else begin
          lsp_bits = {lsp_bits[CHUNK_W-2:0], mag[i][P]}; lsp_cnt++;
        end
      end
    end
    // set bits
    for (int i = 0; i < 4; i++) begin
      if (active && sets_live && rec.has_d[i]) begin
        if (rec.d_nb[i] <= P1) begin
          lis_bits = {lis_bits[CHUNK_W-2:0], rec.d_nb[i] > P0}; lis_cnt++;
        end
        if (rec.has_l[i] && rec.d_nb[i] > P0 && rec.l_nb[i] <= P1) begin
          lis_bits = {lis_bits[CHUNK_W-2:0], rec.l_nb[i] > P0}; lis_cnt++;
        end
      end
    end
  end
endmodule
