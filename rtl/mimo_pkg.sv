// mimo_pkg: shared sizes, types and helper functions of the configurable
// early-pruned K-Best MIMO detector.
//
// The detector works on the real-valued decomposition of an up-to 4x4 complex
// MIMO system, i.e. a tree of up to 2N = 8 layers. Hardware layers are numbered
// 1..8 as the process-element stages PE1..PE8; a smaller antenna mode uses the
// lower-right 2N x 2N corner of the 8 x 8 R matrix, so its tree starts at PE8
// and ends at PE(9-2N). Real constellation points are odd integers (-7..7) times
// a per-modulation normalisation factor (1/sqrt(2), 1/sqrt(10), 1/sqrt(42)).
//
// Fixed-point formats are this design's choice (the source gives only the 12-bit
// PED word of the sorter buffer): y and R are signed Q7.8 (16 bit), candidate
// products R*s are 20 bit with 8 fraction bits, PEDs are unsigned 12 bit with 4
// fraction bits and saturate at all-ones, which also marks an unused slot.
package mimo_pkg;

  localparam int NLAYER   = 8;    // PE stages = layers of the 4x4 tree
  localparam int KBEST    = 4;    // survivors per layer (K), not given by the source
  localparam int DW       = 16;   // width of y and R
  localparam int FRAC     = 8;    // fraction bits of y, R and products
  localparam int CW       = 20;   // width of a candidate product R*s
  localparam int PVW      = 24;   // width of the interference-cancelled value P
  localparam int PW       = 12;   // PED width (12-bit buffer words)
  localparam int PED_FRAC = 4;    // fraction bits of a PED
  localparam int PED_SHIFT = 2*FRAC - PED_FRAC;
  localparam int SF_FRAC  = 12;   // fraction bits of the normalisation factor
  localparam int LW       = 4;    // width of an extension count L (0..8)
  localparam int BW       = 10;   // width of beta, unsigned Q2.8
  localparam int NSYM     = 8;    // real constellation points at most (64-QAM)

  typedef enum logic [1:0] {MOD_QPSK = 2'd0, MOD_16QAM = 2'd1, MOD_64QAM = 2'd2} mod_e;
  typedef enum logic [1:0] {ANT_2X2 = 2'd0, ANT_3X3 = 2'd1, ANT_4X4 = 2'd2} ant_e;

  typedef logic signed [3:0]     sym_t;   // odd integer -7..7
  typedef logic signed [DW-1:0]  data_t;
  typedef logic signed [CW-1:0]  cand_t;
  typedef cand_t [NSYM-1:0]      ctab_t;  // entry c holds R*(2c-7)
  typedef logic signed [PVW-1:0] pval_t;
  typedef logic [PW-1:0]         ped_t;
  typedef logic [LW-1:0]         lcnt_t;
  typedef logic [BW-1:0]         beta_t;

  localparam ped_t PED_MAX = '1;

  // A tree node: its path (symbols of layers above and including its own),
  // its partial Euclidean distance and whether it exists at all.
  typedef struct packed {
    logic                    valid;
    ped_t                    ped;
    sym_t [NLAYER:1]         path;
  } node_t;

  // Real constellation size Omega.
  function automatic int omega(mod_e m);
    case (m)
      MOD_QPSK:  return 2;
      MOD_16QAM: return 4;
      default:   return 8;
    endcase
  endfunction

  // Folding factor N_m: cycles a PE stage spends on one vector.
  function automatic int fold(mod_e m);
    case (m)
      MOD_QPSK:  return 1;
      MOD_16QAM: return 2;
      default:   return 3;
    endcase
  endfunction

  // Normalisation factor, round(2^12/sqrt(E)), E = 2, 10, 42.
  function automatic int scale(mod_e m);
    case (m)
      MOD_QPSK:  return 2896;
      MOD_16QAM: return 1295;
      default:   return 632;
    endcase
  endfunction

  // Number of closed PE stages at the bottom of the chain: 8 - 2N.
  function automatic int closed_stages(ant_e a);
    case (a)
      ANT_2X2: return 4;
      ANT_3X3: return 2;
      default: return 0;
    endcase
  endfunction

  // Candidate-table index of a symbol value: (s + 7) / 2.
  function automatic logic [2:0] cidx(sym_t s);
    logic signed [4:0] t;
    t = 5'(s) + 5'sd7;
    return t[3:1];
  endfunction

  // Symbol value of a candidate-table index: 2c - 7.
  function automatic sym_t csym(logic [2:0] c);
    return sym_t'({1'b0, c, 1'b0} - 5'd7);
  endfunction

  // Sort key: an absent node sorts after every present one.
  function automatic logic [PW:0] nkey(node_t n);
    return {~n.valid, n.ped};
  endfunction

endpackage
