// mult_pkg: types and constants shared by the approximate 16x16 multiplier.
//
// c154_design_e selects which 5-3 compressors a 15-4 compressor is built
// from. ACCURATE uses the exact 5-3 compressor in both places; DESIGN1 uses
// the multiplexer-based approximate 5-3 compressor in both; DESIGN2 uses the
// approximate-adder based 5-3 compressor in both; DESIGN4 mixes them, with
// the higher-pass-rate multiplexer compressor on the heavier carry signals
// and the approximate-adder compressor on the sum signals. A third
// approximate design is not provided.
//
// The column constants place the six 15-4 compressors of the 16x16
// multiplier in product columns 12..17 (weights 2^12..2^17); the first three
// of them are approximate, the last three exact.
package mult_pkg;

  typedef enum int {
    ACCURATE = 0,
    DESIGN1  = 1,
    DESIGN2  = 2,
    DESIGN4  = 4
  } c154_design_e;

  localparam int unsigned N            = 16;  // operand width
  localparam int unsigned PW           = 2 * N; // product width
  localparam int unsigned C154_FIRST   = 12;  // first column with a 15-4 compressor (0-based)
  localparam int unsigned C154_COUNT   = 6;   // number of 15-4 compressors
  localparam int unsigned C154_APPROX  = 3;   // how many of them (from the first) are approximate

endpackage
