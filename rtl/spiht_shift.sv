// spiht_shift: the "shift data" stage of the coding phase.
//
// Takes one block record and brings its four coefficients from their
// level's Variable Fixed-Point format to the common 22-bit magnitude format
// (magnitude shifted left by the level), splitting off the signs. The
// document states that this shift happens as blocks are loaded; the
// sign/magnitude split is this design's choice. Combinational. Only the
// coefficients and the level of the record are used.
module spiht_shift
  import spiht_pkg::*;
(
  input  blk_rec_t                   rec,
  output logic [3:0][MAG_W-1:0]      mag,
  output logic [3:0]                 sign
);
  always_comb
    for (int i = 0; i < 4; i++) begin
      mag[i]  = common_mag(rec.coef[i], rec.level);
      sign[i] = rec.coef[i][COEF_W-1];
    end
endmodule
