// Shared types and constants of the fused dot-product (FDP) unit.
//
// The unit computes Y = A*B + C*D (or A*B - C*D) on IEEE-754 single-precision
// operands with one rounding. Both products are kept in carry-save form and
// are summed in a two's-complement "window" that is wide enough to hold the
// bigger product plus ALIGN_EXT bits below it, one bit of headroom for the
// carry of the sum and two sign bits (the second keeps the leading-zero
// anticipator's error within one position), so the alignment of the
// smaller product is exact for shifts up to ALIGN_EXT; anything shifted
// further collapses into a single sticky bit. The single-precision field
// widths follow IEEE-754; the window size is this design's own choice.
package fdp_pkg;

  localparam int unsigned EXP_W     = 8;                 // exponent field
  localparam int unsigned FRAC_W    = 23;                // fraction field
  localparam int unsigned SIG_W     = FRAC_W + 1;        // significand with hidden one
  localparam int unsigned PROD_W    = 2 * SIG_W;         // exact significand product
  localparam int unsigned BIAS      = 127;
  // Window bits below the bigger product; must be >= 47 so that a product
  // shifted further lies wholly below the window's bit ALIGN_EXT.
  localparam int unsigned ALIGN_EXT = 50;
  localparam int unsigned WIN_W     = PROD_W + ALIGN_EXT + 3;  // + carry headroom + 2 sign bits
  localparam int unsigned LZ_W      = 7;                 // counts 0..WIN_W
  localparam int unsigned PEXP_W    = 11;                // signed product exponent
  localparam int unsigned SHIFT_W   = 10;                // unsigned alignment distance
  localparam int unsigned ADJ_W     = 9;                 // signed exponent adjustment

  localparam logic [31:0] CANON_NAN = 32'h7FC0_0000;

  // Operand after unpacking. Subnormal inputs are read as zero.
  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [SIG_W-1:0]  sig;      // 1.fraction, zero for a zero operand
    logic              is_zero;
    logic              is_inf;
    logic              is_nan;
  } fp_unpacked_t;

  // A significand product in carry-save form: value = s + c.
  typedef struct packed {
    logic [PROD_W-1:0] s;
    logic [PROD_W-1:0] c;
  } cs_prod_t;

  // Operation selected by the forwarding multiplexers.
  typedef enum logic [1:0] {
    MODE_DOT = 2'd0,   // A*B +/- C*D
    MODE_ADD = 2'd1,   // A +/- C, multiplier trees bypassed
    MODE_MUL = 2'd2    // +/- C*D, aligner bypassed
  } fdp_mode_e;

endpackage
