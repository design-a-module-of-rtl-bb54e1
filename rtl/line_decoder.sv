// line_decoder: W-to-2**W one-hot decoder with enable.
//
// Drives the select lines of the word memory from an address register. When
// `en` (RCDE in the RAM) is high exactly one output line, the one numbered by
// `a`, is high; when `en` is low all lines are low, so no cell is selected
// and the memory neither reads nor writes. Purely combinational. The
// decoder and its enable follow the design; the active-high polarity is this
// design's choice.
module line_decoder #(
  parameter int unsigned W = 4
) (
  input  logic              en,
  input  logic [W-1:0]      a,
  output logic [2**W-1:0]   y
);

  always_comb begin
    y = '0;
    if (en) y[a] = 1'b1;
  end

endmodule
