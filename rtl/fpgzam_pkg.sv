// fpgzam_pkg: constants and types shared by the song identifier.
//
// A fingerprint "slice" is the concatenation of five 9-bit FFT bin numbers,
// one per 100-bin frequency range, range 0 in the low bits. A song
// fingerprint is FP_LEN slices, a clip fingerprint CLIP_LEN slices. The song
// memory holds NUM_BANKS songs back to back (bank k starts at (k-1)*FP_LEN).
// The numbers are those of the design description (1024-point FFT, 19-bit
// amplitudes, five ranges of 100 bins, 170/22 slices, threshold 50); the
// bank count of three follows the bank addresses 0/170/340 and the search
// end address 509 used by the controller and the searcher.
package fpgzam_pkg;

  localparam int unsigned FFT_POINTS  = 1024; // transform length
  localparam int unsigned FFT_IDX_W   = 10;   // xk_index width
  localparam int unsigned FFT_AMP_W   = 19;   // FFT output / amplitude width
  localparam int unsigned FB_DATA_W   = 10;   // amplitude bits kept per bin
  localparam int unsigned BIN_W       = 9;    // bin number width (0..511)
  localparam int unsigned NUM_RANGES  = 5;    // frequency ranges per slice
  localparam int unsigned RANGE_LEN   = 100;  // bins per range
  localparam int unsigned SLICE_W     = NUM_RANGES * BIN_W; // 45

  localparam int unsigned FP_LEN      = 170;  // slices per song fingerprint
  localparam int unsigned CLIP_LEN    = 22;   // slices per clip fingerprint
  localparam int unsigned NUM_BANKS   = 3;    // songs held in song memory
  localparam int unsigned SONG_ADDR_W = 9;    // 512 x 45 song memory
  localparam int unsigned CLIP_ADDR_W = 5;    // 32 x 45 clip memory
  localparam int unsigned THRESHOLD   = 50;   // match when delta < THRESHOLD

  typedef logic [BIN_W-1:0]   bin_t;
  typedef logic [SLICE_W-1:0] slice_t;

  // Controller states (names as used in the description).
  typedef enum logic [3:0] {
    ST_IDLE      = 4'd0,
    ST_LEARN     = 4'd1,
    ST_ZAM       = 4'd2,
    ST_SEARCH    = 4'd3,
    ST_FRM_WAIT1 = 4'd4,
    ST_FRM_STORE = 4'd5,
    ST_FRM_WAIT2 = 4'd6,
    ST_FRM_NEXT  = 4'd7
  } zam_state_e;

endpackage
