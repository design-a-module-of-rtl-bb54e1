// mram_pkg: types and constants shared by the vector-access RAM.
//
// The memory is organised as N planes of N x N bits (N = 16 gives 256 words
// of 16 bits). Inside a plane a 16-bit word can be formed in four ways: along
// a row of the plane (the ordinary word), along a column, or along one of the
// two diagonals. The way is chosen by a 2-bit tag that accompanies the word
// number. The four ways and the log2(N)-bit word number come from the
// vector-memory organisation this design follows; the numeric encoding of the
// tag below is this design's own choice.
package mram_pkg;

  // Size of the memory: N planes, N words per plane, N bits per word.
  localparam int unsigned N_DEFAULT = 16;

  // How the addressed word is formed inside the selected plane.
  typedef enum logic [1:0] {
    TAG_ROW  = 2'b00,  // horizontal word: the word number picks a row of cells
    TAG_COL  = 2'b01,  // vertical word: the word number picks a column of cells
    TAG_DIAG = 2'b10,  // main diagonal: cell (k,k) gives bit k
    TAG_ANTI = 2'b11   // anti-diagonal: cell (k,N-1-k) gives bit k
  } access_tag_e;

  // Level of the r_w input that reads; the other level writes.
  localparam logic RW_READ = 1'b1;

endpackage
