// mem_cell: one-bit storage cell of the word memory.
//
// A D flip-flop with two gates around it. When the cell is selected for
// writing (`we`), the clock edge loads the data line `d`; otherwise the clock
// does not change it. When the cell is selected for reading (`re`), its bit
// appears on `q`; otherwise `q` is 0, so that the outputs of many cells can be
// combined on one output line by an OR. Reading is combinational, writing
// needs the select and the data stable at the clock edge, as in a static
// RAM cell. The stored bit has no reset: the contents survive a reset of the
// address logic. Using a clock-enabled flip-flop rather than a gated clock
// is this design's choice.
module mem_cell (
  input  logic clk,
  input  logic we,
  input  logic re,
  input  logic d,
  output logic q
);

  logic bit_q;

  always_ff @(posedge clk) begin
    if (we) bit_q <= d;
  end

  assign q = re & bit_q;

endmodule
