// tb_mem_cell: self-checking test of the one-bit memory cell. Random write
// selects, read selects and data; a reference bit is updated only on
// selected writes, and the gated output must equal it while read-selected
// and be 0 otherwise.
module tb_mem_cell;
  logic clk = 0, we = 0, re = 0, d = 0, q;
  logic ref_bit;
  int checks = 0, failures = 0;
  int writes = 0, reads = 0;

  mem_cell dut (.clk, .we, .re, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initialise the cell with a known value first.
    @(negedge clk); we = 1; d = 1; re = 0;
    @(posedge clk); ref_bit = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 2) == 0);
      re = $urandom_range(0, 1) == 1;
      d  = $urandom_range(0, 1) == 1;
      #1;
      checks++;
      if (q !== (re & ref_bit)) begin
        failures++;
        $display("FAIL before edge: re=%0b q=%0b stored=%0b", re, q, ref_bit);
      end
      if (re) reads++;
      @(posedge clk);
      if (we) begin ref_bit = d; writes++; end
      #1;
      checks++;
      if (q !== (re & ref_bit)) begin
        failures++;
        $display("FAIL after edge: we=%0b re=%0b q=%0b stored=%0b", we, re, q, ref_bit);
      end
    end
    checks++;
    if (writes == 0 || reads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
