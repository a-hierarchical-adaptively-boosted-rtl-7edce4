// abc_pkg: constants, types and helper functions shared by the in-memory
// AdaBoost classifier.
//
// The classifier sorts an image of 256 8-bit pixels into one of 10 classes with
// 45 one-versus-one boosted (strong) binary classifiers of 256 weak classifiers
// each. A weak classifier compares one pixel X with a stored threshold T; the
// comparison is done inside the SRAM, 128 comparisons at a time.
//
// Storage layout (this design's choice, consistent with the bit positions of the
// functional read): an 8-bit word w of a 4-row group lives in the column pair
// (2w, 2w+1). Row r of the group holds bit 4+r in column 2w (MSB column) and bit
// r in column 2w+1 (LSB column). A 64-bit slice of one row, taken through the
// 4:1 column mux, therefore carries one row of 32 consecutive words; the 16
// slices (4 rows x 4 mux positions) of a group carry all 128 words. The helper
// functions below pack and unpack such slices.
package abc_pkg;

  localparam int unsigned PIX_W      = 8;    // pixel and threshold precision
  localparam int unsigned N_PIX      = 256;  // pixels per image
  localparam int unsigned N_BANK     = 4;    // deterministic sub-sampling banks
  localparam int unsigned BANK_PIX   = 64;   // pixels per bank
  localparam int unsigned N_CMP      = 128;  // in-memory comparators
  localparam int unsigned CMP_PER_CB = 32;   // comparators fed by one crossbar
  localparam int unsigned IDX_W      = 6;    // pixel index width (64:1 crossbar)
  localparam int unsigned N_STRONG   = 45;   // one-vs-one strong classifiers
  localparam int unsigned N_WEAK     = 256;  // weak classifiers per strong classifier
  localparam int unsigned N_CLASS    = 10;
  localparam int unsigned IO_W       = 64;   // normal read/write port width
  localparam int unsigned COLS       = 256;  // bit-cell array columns
  localparam int unsigned ALPHA_W    = 8;    // signed alpha coefficient
  localparam int unsigned SOFT_W     = 18;   // signed soft decision / thresholds
  localparam int unsigned GRPS_PER_N = 6;    // row groups per strong classifier
  localparam int unsigned GRP_W      = 7;    // row-group address (512 rows / 4)
  localparam int unsigned N_W        = 6;    // strong classifier index width

  typedef enum logic [1:0] {
    MODE_LP     = 2'd0,   // one-to-one pixel mapping, crossbar bypassed
    MODE_HA     = 2'd1,   // crossbar maps pixels by stored pixel index
    MODE_HYBRID = 2'd2    // LP first, HA only for low-margin decisions
  } mode_e;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic signed [SOFT_W-1:0] soft_t;

  // Offsets of the three parameter groups of a strong classifier inside its
  // six-group slot; each parameter set spans two groups (weak classifiers
  // 1-128 and 129-256).
  localparam int unsigned OFS_P   = 0;
  localparam int unsigned OFS_THA = 2;
  localparam int unsigned OFS_TLP = 4;

  // Word j (0..31) of a 64-bit row slice taken from row r of a group.
  function automatic logic [1:0] slice_bits(input pix_t word, input logic [1:0] r);
    return {word[{1'b0, r}], word[{1'b1, r}]};   // {LSB column, MSB column}
  endfunction

  // Build the 64-bit slice of row r for 32 words.
  function automatic logic [IO_W-1:0] pack_slice(input pix_t words [CMP_PER_CB],
                                                  input logic [1:0] r);
    logic [IO_W-1:0] s;
    for (int j = 0; j < CMP_PER_CB; j++) s[2*j +: 2] = slice_bits(words[j], r);
    return s;
  endfunction

  // Class pair (a, b), a < b, of strong classifier n in the order
  // 0v1, 0v2, ..., 0v9, 1v2, ..., 8v9.
  function automatic logic [7:0] class_pair(input logic [N_W-1:0] n);
    int unsigned k;
    logic [7:0] res;
    k = 0;
    res = '0;
    for (int a = 0; a < int'(N_CLASS); a++)
      for (int b = a + 1; b < int'(N_CLASS); b++) begin
        if (k == int'(n)) res = {4'(a), 4'(b)};
        k++;
      end
    return res;
  endfunction

endpackage
