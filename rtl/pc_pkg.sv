// pc_pkg: constants, types and constant functions shared by the row-column
// parallel product-code turbo decoder.
//
// The component code of the product code is an extended BCH code of length
// n = 2^m with a single-error-correcting capability (minimum distance 4): a
// cyclic Hamming code of length 2^m - 1 plus one overall parity bit. Codeword
// position p (0 <= p <= n-2) belongs to the Hamming part and has the parity-check
// column alpha^p, an element of GF(2^m) in polynomial basis; position n-1 is the
// overall parity bit. Positions 0..m-1 therefore have unit-vector columns and
// are used as the systematic check positions.
//
// Fixed-point conventions (this design's choices):
//   * channel samples R and extrinsic values W are Q-bit two's complement,
//     kept symmetric in [-(2^(Q-1)-1), 2^(Q-1)-1];
//   * the weighted input R' = R + alpha*W is Q+1 bits;
//   * alpha is an unsigned number with ALPHA_FRAC fractional bits (16 = 1.0);
//   * beta is an unsigned number in W least-significant-bit units;
//   * bit 0 is sent as +1 and bit 1 as -1, so the hard decision is the sign bit.
package pc_pkg;

  // quantisation width of the matrix symbols (q in the memory size q*n^2)
  parameter int unsigned Q          = 5;
  parameter int unsigned ALPHA_FRAC = 4;
  parameter int unsigned ALPHA_W    = ALPHA_FRAC + 1;

  // primitive polynomial of GF(2^m) without its x^m term, for m = 3..8
  function automatic int unsigned prim_poly(input int unsigned m);
    case (m)
      3:       return 32'h3;    // x^3+x+1
      4:       return 32'h3;    // x^4+x+1
      5:       return 32'h5;    // x^5+x^2+1
      6:       return 32'h3;    // x^6+x+1
      7:       return 32'h9;    // x^7+x^3+1
      8:       return 32'h1D;   // x^8+x^4+x^3+x^2+1
      default: return 32'h5;
    endcase
  endfunction

  // alpha^p in GF(2^m), polynomial basis
  function automatic int unsigned gf_pow(input int unsigned m, input int unsigned p);
    int unsigned v;
    v = 1;
    for (int unsigned s = 0; s < p; s++) begin
      v = v << 1;
      if (v[m]) v = (v & ((1 << m) - 1)) ^ prim_poly(m);
    end
    return v;
  endfunction

  // saturate a signed value to a symmetric W-bit two's-complement range
  function automatic int sat_sym(input int v, input int unsigned w);
    int lim;
    lim = (1 << (w - 1)) - 1;
    if (v > lim)  return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  // phases of one codeword decoding, shared by the scheduler and its users
  typedef enum logic [1:0] {
    PH_IDLE  = 2'd0,
    PH_READ  = 2'd1,   // symbols of the codeword are read and fed to the decoders
    PH_WAIT  = 2'd2,   // the decoders run their Chase search
    PH_WRITE = 2'd3    // new extrinsic values are written back, decisions emitted
  } phase_e;

endpackage
