// tb_line_decoder: exhaustive self-checking test of the enabled 4-to-16
// decoder. For every address and both enable levels the expected one-hot
// pattern is built by shifting a 1 and compared with the output.
module tb_line_decoder;
  localparam int unsigned W = 4;
  logic en;
  logic [W-1:0] a;
  logic [2**W-1:0] y, expect_y;
  int checks = 0, failures = 0;

  line_decoder #(.W(W)) dut (.en, .a, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 2**W; i++) begin
        en = e[0];
        a  = W'(i);
        #1;
        expect_y = e ? (16'(1) << i) : '0;
        checks++;
        if (y !== expect_y) begin
          failures++;
          $display("FAIL en=%0d a=%0d y=%h expected %h", en, a, y, expect_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
