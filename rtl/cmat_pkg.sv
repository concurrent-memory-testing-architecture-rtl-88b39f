// cmat_pkg: types shared by the concurrent memory access and on-chip
// testing (CMAT) memory.
//
// A CMAT memory matrix is an N x N bit array (N = 2**b) with two extra test
// structures: a row neighborhood (RN, one extra row of N cells enabled by
// its own line) and a column neighborhood (CN, one extra column of N cells
// enabled by its own line). Every access to the array, whether it comes from
// the external port or from the built-in tester (BIT), is described by one
// arr_op_t per clock cycle: which decoders and which neighborhood enable lines
// are on, the row/column addresses, and whether the cycle writes.
package cmat_pkg;

  // Largest supported address width. Ports carry b-bit addresses; this only
  // bounds loops in helper functions.
  localparam int unsigned MAX_B = 16;

  // One array cycle. Addresses are sized to MAX_B and truncated by the user.
  typedef struct packed {
    logic              en;       // cycle uses the array at all
    logic              we;       // 1: write wdata, 0: read
    logic              wdata;    // write data (the matrix is bit-organised)
    logic              row_en;   // row decoder outputs enabled
    logic              col_en;   // column decoder outputs enabled
    logic              rn_en;    // row neighborhood enable line
    logic              cn_en;    // column neighborhood enable line
    logic [MAX_B-1:0]  row;      // row address
    logic [MAX_B-1:0]  col;      // column address
  } arr_op_t;

  localparam arr_op_t ARR_IDLE = '0;

  // Top-level phase of the free-running built-in tester.
  typedef enum logic [1:0] {
    BIT_IDLE   = 2'd0,  // testing disabled
    BIT_PERIPH = 2'd1,  // decoder and sense-amplifier test (RN/CN)
    BIT_CELLS  = 2'd2   // serial ASND test of the memory cells
  } bit_phase_e;

  // State of the peripheral-circuit tester.
  typedef enum logic [1:0] {
    PT_IDLE = 2'd0,
    PT_DEC  = 2'd1,     // row/column decoder test through CN and RN
    PT_SA   = 2'd2      // sense amplifier test
  } periph_state_e;

  // Number of cells in an augmented single-cell test neighborhood (3 x 3).
  localparam int unsigned ASND_CELLS = 9;
  // Length K of the ASND test pattern produced by cmat_asnd_pg: clear the
  // ASND, then for each of the 256 neighbour patterns (Gray-code order) one
  // neighbour write + read (none for the first) and w1 r w0 r on the centre
  // cell, then read all cells.
  localparam int unsigned ASND_K = ASND_CELLS + 255 * 2 + 256 * 4 + ASND_CELLS;

  // State of the memory-cell tester.
  typedef enum logic [2:0] {
    CT_IDLE  = 3'd0,
    CT_SAVE0 = 3'd1,    // save the first ASND into the buffer
    CT_TEST  = 3'd2,    // apply the ASND pattern to the ASND and the mirror
    CT_LOADC = 3'd3,    // load the trailing column back into the matrix
    CT_SAVEC = 3'd4,    // save the leading column into the buffer
    CT_LOADR = 3'd5,    // load the top row back (row change)
    CT_SAVER = 3'd6,    // save the new bottom row (row change)
    CT_LOADF = 3'd7     // load the last ASND back, pass complete
  } cell_state_e;

endpackage
