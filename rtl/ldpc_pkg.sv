// Shared types and defaults of the LDPC encoder.
//
// The encoder stores each sparse matrix of the preprocessed parity-check
// matrix as a list of column positions of its ones, row after row, with an
// end-of-row flag on the last entry of every row. Column positions are
// 1-based; position 0 marks an empty row (one entry with the end-of-row flag
// set and nothing to select). This follows the storage format described for
// the design. The default sizes are those of the rate 1/2, length 2000 code
// the design was evaluated with (gap 2, edge counts per matrix).
package ldpc_pkg;

  // Default code dimensions: n = 2000, m = 1000, gap g = 2.
  localparam int unsigned N_DEFAULT = 2000;
  localparam int unsigned M_DEFAULT = 1000;
  localparam int unsigned G_DEFAULT = 2;

  // Default table depths: number of stored entries per matrix.
  localparam int unsigned EA_DEFAULT = 6273;  // A: (m-g) x (n-m)
  localparam int unsigned EB_DEFAULT = 998;   // B: (m-g) x g
  localparam int unsigned ET_DEFAULT = 2398;  // T: (m-g) x (m-g), lower triangular
  localparam int unsigned EC_DEFAULT = 10;    // C: g x (n-m)
  localparam int unsigned EE_DEFAULT = 6;     // E: g x (m-g)
  localparam int unsigned EF_DEFAULT = 2;     // F: g x g, holds the inverse used for p1

  // Width of a table address on the configuration port.
  localparam int unsigned TAW = 16;

  // Which lookup table a configuration write goes to.
  typedef enum logic [2:0] {
    TBL_A = 3'd0,
    TBL_B = 3'd1,
    TBL_T = 3'd2,
    TBL_C = 3'd3,
    TBL_E = 3'd4,
    TBL_F = 3'd5,
    TBL_P = 3'd6   // codeword permutation table
  } tbl_sel_e;

endpackage
