// ant_pkg: sizes and constants shared by the ANT Vedic multiplier.
//
// N is the operand width of the main (exact) multiplier and M the width of the
// reduced-precision replica (RPR), which works on the M most significant bits
// of each operand and produces M product bits. 12 and 6 are the configuration
// of the design; TH_DEFAULT is the detection threshold for that configuration.
//
// TH_DEFAULT is the threshold equation Th = max over all inputs of
// |x*y - yr*2^(2N-M)| evaluated for the RPR in rpr_fixed_width.sv. For each pair
// of operand high halves (xh, yh) the RPR output yr is fixed and x*y grows with
// the low halves, so the maximum lies at low halves all-zero or all-one:
//   TH = max over xh,yh in [0,63] of max(|xh*yh*2^12 - yr*2^18|,
//                                        |(64*xh+63)*(64*yh+63) - yr*2^18|)
// which gives 455553 (0x6F381) for N = 12, M = 6. The testbenches recompute it.
package ant_pkg;
  localparam int unsigned N_DEFAULT  = 12;
  localparam int unsigned M_DEFAULT  = 6;
  localparam int unsigned TH_DEFAULT = 455553;
endpackage
