// tb_vector_word_memory: self-checking test of the word memory with row,
// column and diagonal access, at the full 16 x 16 x 16 size. A reference copy
// of the cell array, kept as ref[plane][word][bit], is filled by ordinary
// word writes, then random reads and writes of all four word kinds are
// applied. The expected read word and the effect of each write are computed
// from the reference with the index rules of each tag. Deselected accesses
// (no row line) must read 0 and must not write.
module tb_vector_word_memory;
  import mram_pkg::*;
  localparam int unsigned N = 16;

  logic clk = 0;
  logic [N-1:0] row_sel = '0, col_sel = '0, din = '0, dout;
  access_tag_e tag = TAG_ROW;
  logic r_w = 1'b1;
  logic [N-1:0] ref_mem [N][N];
  int checks = 0, failures = 0;
  int n_tag [4] = '{default: 0};
  int idle = 0;

  vector_word_memory #(.N(N)) dut (.clk, .row_sel, .col_sel, .tag, .r_w, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cell (w,b) of the plane that holds bit k of word c for tag t.
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

  task automatic access(bit rd, int r, access_tag_e t, int c, logic [N-1:0] v);
    @(negedge clk);
    row_sel = N'(1) << r;
    col_sel = N'(1) << c;
    tag = t; r_w = rd ? RW_READ : ~RW_READ; din = v;
    #1;
    if (rd) begin
      checks++;
      if (dout !== ref_read(r, t, c)) begin
        failures++;
        $display("FAIL read plane %0d tag %s word %0d: %h expected %h",
                 r, t.name(), c, dout, ref_read(r, t, c));
      end
    end
    @(posedge clk);
    if (!rd) ref_write(r, t, c, v);
    n_tag[t]++;
  endtask

  initial begin
    // Fill every word with ordinary writes.
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        access(0, r, TAG_ROW, c, N'($urandom));
    for (int i = 0; i < 6000; i++) begin
      access($urandom_range(0, 1) == 1, $urandom_range(0, N-1),
             access_tag_e'($urandom_range(0, 3)), $urandom_range(0, N-1), N'($urandom));
    end
    // Deselected: a write with no row line must change nothing and read 0.
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      row_sel = '0; col_sel = N'(1) << $urandom_range(0, N-1);
      tag = access_tag_e'($urandom_range(0, 3)); r_w = ~RW_READ; din = N'($urandom);
      #1; checks++;
      if (dout !== '0) begin failures++; $display("FAIL deselected output %h", dout); end
      @(posedge clk); idle++;
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        access(1, r, TAG_ROW, c, '0);
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (n_tag[t] == 0) begin failures++; $display("FAIL tag %0d never used", t); end
    end
    $display("accesses per tag: row %0d col %0d diag %0d anti %0d, idle %0d",
             n_tag[0], n_tag[1], n_tag[2], n_tag[3], idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
