// tb_mram_256x16: end-to-end self-checking test of the 256 x 16 RAM at its
// default size, driven only through its pins.
//
// Each access is a RAS cycle (row number on the address bus), a CAS cycle
// (word number on the bus) and a cycle with RCDE high in which the word is
// read or written; accesses to the same row may skip the RAS cycle. The test
// writes all 256 words, reads them back, then runs random reads and writes
// of row, column and diagonal words, compared against a reference copy of
// the bit array. It also checks that with RCDE low nothing is written and the
// output is 0, that a strobe updates its register only at the clock edge
// (so the new word appears one cycle after CAS), and that a reset clears the
// address registers while the stored words survive. Every mechanism is
// counted and a mechanism that never happened counts as a failure.
module tb_mram_256x16;
  import mram_pkg::*;
  localparam int unsigned N  = N_DEFAULT;
  localparam int unsigned AW = $clog2(N);

  logic clk = 0, rst_n = 0, ras = 0, cas = 0, rcde = 0, r_w = RW_READ;
  access_tag_e tag = TAG_ROW;
  logic [AW-1:0] address_bus = '0;
  logic [N-1:0]  input_bus = '0, output_bus;

  logic [N-1:0] ref_mem [N][N];
  int cur_row = 0, cur_col = 0;
  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_ras = 0, n_cas = 0, n_write = 0, n_read = 0, n_same_row = 0;
  int n_tag [4] = '{default: 0};
  int n_disabled = 0, n_reset_kept = 0, n_edge = 0;

  mram_256x16 dut (
    .clk, .rst_n, .ras, .cas, .rcde, .r_w, .tag,
    .address_bus, .input_bus, .output_bus
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void cell_of(access_tag_e t, int c, int k, output int w, output int b);
    case (t)
      TAG_ROW:  begin w = c; b = k;         end
      TAG_COL:  begin w = k; b = c;         end
      TAG_DIAG: begin w = k; b = k;         end
      default:  begin w = k; b = N - 1 - k; end
    endcase
  endfunction

  function automatic logic [N-1:0] ref_read(int r, access_tag_e t, int c);
    logic [N-1:0] v;
    int w, b;
    for (int k = 0; k < N; k++) begin
      cell_of(t, c, k, w, b);
      v[k] = ref_mem[r][w][b];
    end
    return v;
  endfunction

  task automatic ref_write(int r, access_tag_e t, int c, logic [N-1:0] v);
    int w, b;
    for (int k = 0; k < N; k++) begin
      cell_of(t, c, k, w, b);
      ref_mem[r][w][b] = v[k];
    end
  endtask

  task automatic expect_out(logic [N-1:0] exp, string what);
    checks++;
    if (output_bus !== exp) begin
      failures++;
      $display("FAIL %s: output_bus=%h expected %h (row %0d word %0d tag %s)",
               what, output_bus, exp, cur_row, cur_col, tag.name());
    end
  endtask

  task automatic strobe_row(int r);
    @(negedge clk);
    rcde = 0; ras = 1; cas = 0; address_bus = AW'(r);
    @(posedge clk);
    cur_row = r; n_ras++;
  endtask

  task automatic strobe_col(int c);
    @(negedge clk);
    rcde = 0; ras = 0; cas = 1; address_bus = AW'(c);
    @(posedge clk);
    cur_col = c; n_cas++;
  endtask

  // One RCDE cycle reading or writing the word of the held row and column.
  task automatic data_cycle(bit rd, access_tag_e t, logic [N-1:0] v);
    @(negedge clk);
    ras = 0; cas = 0; rcde = 1; tag = t;
    r_w = rd ? RW_READ : ~RW_READ; input_bus = v;
    address_bus = AW'($urandom);  // the bus is free once both halves are held
    #1;
    if (rd) begin
      expect_out(ref_read(cur_row, t, cur_col), "read");
      n_read++;
    end else begin
      expect_out('0, "output while writing");
    end
    @(posedge clk);
    if (!rd) begin ref_write(cur_row, t, cur_col, v); n_write++; end
    n_tag[t]++;
    @(negedge clk);
    rcde = 0;
    #1 expect_out('0, "output with RCDE low");
  endtask

  task automatic access(bit rd, int r, access_tag_e t, int c, logic [N-1:0] v);
    if (r != cur_row || $urandom_range(0, 3) == 0) strobe_row(r);
    else n_same_row++;
    strobe_col(c);
    data_cycle(rd, t, v);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. Fill the RAM with ordinary word writes.
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        access(0, r, TAG_ROW, c, N'($urandom));
    // 2. Read every word back, row by row.
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        access(1, r, TAG_ROW, c, '0);
    // 3. Random mixed accesses of every word kind.
    for (int i = 0; i < 4000; i++)
      access($urandom_range(0, 1) == 1, $urandom_range(0, N-1),
             access_tag_e'($urandom_range(0, 3)), $urandom_range(0, N-1), N'($urandom));
    // 4. RCDE low: r_w low must write nothing, output stays 0.
    for (int i = 0; i < 20; i++) begin
      strobe_row($urandom_range(0, N-1));
      strobe_col($urandom_range(0, N-1));
      @(negedge clk);
      ras = 0; cas = 0; rcde = 0; r_w = ~RW_READ; input_bus = N'($urandom);
      #1 expect_out('0, "output with decoders disabled");
      @(posedge clk);
      n_disabled++;
      data_cycle(1, TAG_ROW, '0);  // must still hold the old word
    end
    // 5. The column register takes CAS at the clock edge: in the CAS cycle the
    //    output still shows the word of the old column, one cycle later the new.
    for (int i = 0; i < 20; i++) begin
      int c_new;
      strobe_row($urandom_range(0, N-1));
      strobe_col($urandom_range(0, N-1));
      c_new = (cur_col + 1 + $urandom_range(0, N-2)) % N;
      @(negedge clk);
      ras = 0; cas = 1; rcde = 1; r_w = RW_READ; tag = TAG_ROW; address_bus = AW'(c_new);
      #1 expect_out(ref_read(cur_row, TAG_ROW, cur_col), "old word during CAS cycle");
      @(posedge clk);
      cur_col = c_new; n_cas++;
      @(negedge clk);
      cas = 0;
      #1 expect_out(ref_read(cur_row, TAG_ROW, cur_col), "new word one cycle after CAS");
      n_edge++;
      @(negedge clk);
      rcde = 0;
    end
    // 6. Reset: registers go to row 0, word 0; stored words are kept.
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1; cur_row = 0; cur_col = 0;
    data_cycle(1, TAG_ROW, '0);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        access(1, r, TAG_ROW, c, '0);
        n_reset_kept++;
      end
    // Every mechanism must have happened.
    foreach (n_tag[t]) begin
      checks++;
      if (n_tag[t] == 0) begin failures++; $display("FAIL tag %0d never used", t); end
    end
    checks++; if (n_ras == 0)        begin failures++; $display("FAIL no RAS"); end
    checks++; if (n_cas == 0)        begin failures++; $display("FAIL no CAS"); end
    checks++; if (n_write == 0)      begin failures++; $display("FAIL no write"); end
    checks++; if (n_read == 0)       begin failures++; $display("FAIL no read"); end
    checks++; if (n_same_row == 0)   begin failures++; $display("FAIL no row reuse"); end
    checks++; if (n_disabled == 0)   begin failures++; $display("FAIL no disabled cycle"); end
    checks++; if (n_edge == 0)       begin failures++; $display("FAIL no CAS timing check"); end
    checks++; if (n_reset_kept == 0) begin failures++; $display("FAIL no reset check"); end
    $display("RAS %0d CAS %0d reads %0d writes %0d same-row %0d; tags row %0d col %0d diag %0d anti %0d",
             n_ras, n_cas, n_read, n_write, n_same_row, n_tag[0], n_tag[1], n_tag[2], n_tag[3]);
    $display("disabled %0d CAS-edge %0d words checked after reset %0d",
             n_disabled, n_edge, n_reset_kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
