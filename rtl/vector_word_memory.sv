// vector_word_memory: N x N array of N-bit words with row, column and
// diagonal word access (16 x 16 words of 16 bits by default).
//
// The array holds N*N*N one-bit cells (4096 by default), arranged as N planes
// of N x N bits. Plane r is the row of the word memory selected by row line r;
// inside a plane, cell (w,b) is bit b of the ordinary word w. One access reads
// or writes one N-bit word of the selected plane, formed as the tag says:
//
//   TAG_ROW   word c : bit b <-> cell (c, b)        (the conventional word)
//   TAG_COL   word c : bit k <-> cell (k, c)
//   TAG_DIAG         : bit k <-> cell (k, k)
//   TAG_ANTI         : bit k <-> cell (k, N-1-k)
//
// The word number c arrives one-hot on the column lines; the diagonals need
// no word number. Each plane therefore has 2N+2 word-select lines (N row-word
// lines, N column-word lines, two diagonal lines) and two sets of N data
// lines: horizontal line b serves bit b of a row word, vertical line k serves
// bit k of a column or diagonal word. Every cell gates its bit onto both
// sets; the read word is the OR of the horizontal lines for TAG_ROW and of the
// vertical lines otherwise. Words along rows, columns and diagonals, the
// 2N+2 select lines and the 2N data lines follow the vector-memory
// organisation; the bit order inside column and diagonal words is this
// design's choice.
//
// Interface and timing: with exactly one row line high, `r_w` high reads the
// selected word combinationally on `dout`; `r_w` low writes `din` into it at
// the rising clock edge. With no row line high (decoders disabled) nothing is
// written and `dout` is 0.
module vector_word_memory
  import mram_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic          clk,
  input  logic [N-1:0]  row_sel,
  input  logic [N-1:0]  col_sel,
  input  access_tag_e   tag,
  input  logic          r_w,
  input  logic [N-1:0]  din,
  output logic [N-1:0]  dout
);

  logic rd, wr;
  assign rd = (r_w == RW_READ);
  assign wr = !rd;

  // Gated cell outputs: q[r][w][b] for plane r, cell (w,b), and the same bits
  // transposed as qt[r][b][w].
  logic [N-1:0][N-1:0] q  [N];
  logic [N-1:0][N-1:0] qt [N];
  // Per-plane horizontal and vertical data lines.
  logic [N-1:0] h_plane [N];
  logic [N-1:0] v_plane [N];

  // The 2N+2 word-select lines, driven by the word number and the tag:
  // N row-word lines, N column-word lines and the two diagonal lines.
  logic [N-1:0] hw_line, vw_line;
  logic         diag_line, anti_line;
  always_comb begin
    hw_line   = (tag == TAG_ROW) ? col_sel : '0;
    vw_line   = (tag == TAG_COL) ? col_sel : '0;
    diag_line = (tag == TAG_DIAG);
    anti_line = (tag == TAG_ANTI);
  end

  for (genvar r = 0; r < N; r++) begin : g_plane
    for (genvar w = 0; w < N; w++) begin : g_word
      for (genvar b = 0; b < N; b++) begin : g_bit
        logic sel, d;
        // Cell (w,b) lies on row-word line w, column-word line b and, where
        // it sits on one, a diagonal line.
        always_comb begin
          sel = hw_line[w] | vw_line[b];
          if (w == b)         sel = sel | diag_line;
          if (w + b == N - 1) sel = sel | anti_line;
          sel = sel & row_sel[r];
          // Horizontal data line b for row words, vertical line w otherwise.
          d = (tag == TAG_ROW) ? din[b] : din[w];
        end
        mem_cell u_cell (
          .clk (clk),
          .we  (sel & wr),
          .re  (sel & rd),
          .d   (d),
          .q   (q[r][w][b])
        );
        assign qt[r][b][w] = q[r][w][b];
      end
      // Vertical line w of the plane: OR of the cells of word w.
      assign v_plane[r][w] = |q[r][w];
      // Horizontal line w of the plane (index reused as the bit number).
      assign h_plane[r][w] = |qt[r][w];
    end
  end

  // OR the planes onto the shared horizontal and vertical data lines.
  logic [N-1:0] h_line, v_line;
  always_comb begin
    h_line = '0;
    v_line = '0;
    for (int r = 0; r < N; r++) begin
      h_line = h_line | h_plane[r];
      v_line = v_line | v_plane[r];
    end
  end

  assign dout = (tag == TAG_ROW) ? h_line : v_line;

  // At most one plane and one word line may be selected at a time.
  always_comb begin
    assert ($onehot0(row_sel)) else $error("vector_word_memory: several row lines selected");
    assert ($onehot0(col_sel)) else $error("vector_word_memory: several word lines selected");
  end

endmodule
