// approx_dct_pkg - shared types and constants of the approximate 2D DCT.
//
// Names the seven multiplier-free 8-point DCT approximations that the design
// implements, and gives, for each, the word growth of one 1D pass (the base-2
// logarithm of the largest row sum of |T|, rounded up) and the pipeline
// latency of its 1D core. The cores themselves are in <kind>_dct1d.sv; the 2D
// engine approx_dct2d picks one of them with a KIND parameter.
// The list of transforms and their matrices follow the published
// approximations; the widths and latencies are choices of this design.
package approx_dct_pkg;

  // Points of the 1D transform and side of the 2D block.
  localparam int unsigned N = 8;
  // Number of transforms held side by side in the top level.
  localparam int unsigned NUM_KINDS = 7;

  typedef enum logic [2:0] {
    BAS2008     = 3'd0,  // Bouguezel-Ahmad-Swamy 2008, entries {0, +-1/2, +-1}
    BAS2011     = 3'd1,  // Bouguezel-Ahmad-Swamy 2011, one parameter a
    CB2011      = 3'd2,  // Cintra-Bayer 2011, entries {0, +-1}
    MCB2011     = 3'd3,  // modified Cintra-Bayer (Bayer-Cintra 2012)
    POTLURI2012 = 3'd4,  // Potluri et al. 2012, entries {0, +-1, +-2}
    POTLURI2014 = 3'd5,  // Potluri et al. 2014
    VAITHY2014  = 3'd6   // Vaithyanathan (Dhandapani-Ramachandran) 2014
  } dct_kind_e;

  // Value of the BAS-2011 parameter a.
  typedef enum logic [1:0] {
    A_ZERO = 2'd0,
    A_HALF = 2'd1,
    A_ONE  = 2'd2
  } bas_a_e;

  // Bits added by one 1D pass at full precision.
  function automatic int unsigned growth(dct_kind_e k);
    case (k)
      POTLURI2012: return 4;  // largest row sum of |T| is 12
      VAITHY2014:  return 2;  // largest row sum of |T| is 4
      default:     return 3;  // largest row sum of |T| is 8
    endcase
  endfunction

  // Clock cycles from an input vector to its transformed vector.
  function automatic int unsigned latency(dct_kind_e k);
    case (k)
      POTLURI2012: return 4;
      VAITHY2014:  return 2;
      default:     return 3;
    endcase
  endfunction

endpackage
