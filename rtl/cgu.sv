// cgu: candidate generation unit.
//
// Produces every product R*s that a PE stage may need for one channel
// coefficient R, so that the K father-node PEs and 2K child-node PEs of a stage
// only pick a candidate with a multiplexer instead of multiplying. Following the
// candidate-sharing structure of the source: the coefficient is first multiplied
// by the modulation's normalisation factor (X = R * scale), then 3X, 5X and 7X
// are formed with left shifts and adders (X+2X, X+4X, 8X-X), and the negative
// candidates by negation.
//
// Interface: r (Q7.8), mod selects the normalisation factor; cand[c] = X*(2c-7)
// for c = 0..7 (Q.8, 20 bit). Purely combinational; R is constant for a frame,
// so the outputs only change when a new channel is loaded.
module cgu
  import mimo_pkg::*;
(
  input  data_t r,
  input  mod_e  mod,
  output ctab_t cand
);
  logic signed [DW+SF_FRAC+1:0] prod;
  cand_t x1, x3, x5, x7;

  always_comb begin
    prod = $signed({{(SF_FRAC+2){r[DW-1]}}, r}) * $signed((DW+SF_FRAC+2)'(scale(mod)));
    x1   = cand_t'(prod >>> SF_FRAC);
    x3   = x1 + (x1 <<< 1);
    x5   = x1 + (x1 <<< 2);
    x7   = (x1 <<< 3) - x1;
    cand[0] = -x7;
    cand[1] = -x5;
    cand[2] = -x3;
    cand[3] = -x1;
    cand[4] = x1;
    cand[5] = x3;
    cand[6] = x5;
    cand[7] = x7;
  end
endmodule
