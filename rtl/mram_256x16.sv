// mram_256x16: 256 x 16-bit RAM with two-dimensional word selection and
// row, column and diagonal word access for vector processing.
//
// The 8-bit word address arrives as two 4-bit halves on one address bus. RAS
// loads the bus into the row register, CAS loads it into the column register.
// RCDE enables the two 4-to-16 decoders that turn the registers into one-hot
// row lines and word lines of a 16 x 16 word memory; a word is selected where
// its row line and its word line cross, so each decoder drives only 16 lines
// instead of the 256 of a one-dimensional RAM. While RCDE is high, r_w = 1
// reads the selected word on output_bus and r_w = 0 writes input_bus into it.
// The 2-bit tag chooses how the word is formed inside the selected row, which
// is a 16 x 16-bit plane: the ordinary word numbered by the column register,
// the column of bits numbered by it, or one of the two diagonals
// (see vector_word_memory). With the tag at TAG_ROW the RAM behaves as a
// plain 256 x 16 RAM with address {row, column}.
//
// Timing (all on the rising edge of clk): a cycle with RAS high loads the
// row register, a cycle with CAS high loads the column register (both in one
// cycle is allowed). From the next cycle on, with RCDE high, a read word is
// on output_bus combinationally, and a write takes place at the end of each
// cycle with RCDE high and r_w low. With RCDE low output_bus is 0.
// The register / decoder / word-memory structure, the signal names and the
// read/write polarity follow the design; the clock, the synchronous strobes,
// the reset (which clears the address registers but, as in a non-volatile
// memory, not the stored words) and the tag encoding are this design's
// choices.
module mram_256x16
  import mram_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ras,
  input  logic          cas,
  input  logic          rcde,
  input  logic          r_w,
  input  access_tag_e   tag,
  input  logic [AW-1:0] address_bus,
  input  logic [N-1:0]  input_bus,
  output logic [N-1:0]  output_bus
);

  logic [AW-1:0] row_q, col_q;
  logic [N-1:0]  row_sel, col_sel;

  addr_register #(.W(AW)) u_row_reg (
    .clk (clk), .rst_n (rst_n), .load (ras), .d (address_bus), .q (row_q)
  );

  addr_register #(.W(AW)) u_col_reg (
    .clk (clk), .rst_n (rst_n), .load (cas), .d (address_bus), .q (col_q)
  );

  line_decoder #(.W(AW)) u_row_dec (.en (rcde), .a (row_q), .y (row_sel));
  line_decoder #(.W(AW)) u_col_dec (.en (rcde), .a (col_q), .y (col_sel));

  vector_word_memory #(.N(N)) u_mem (
    .clk     (clk),
    .row_sel (row_sel),
    .col_sel (col_sel),
    .tag     (tag),
    .r_w     (r_w),
    .din     (input_bus),
    .dout    (output_bus)
  );

endmodule
