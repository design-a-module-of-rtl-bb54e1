// tb_addr_register: self-checking test of the RAS/CAS address register.
// Drives random load strobes and bus values, keeps its own copy of the value
// the register should hold and compares after every clock edge; also checks
// that reset clears the register and that it holds while load is low.
module tb_addr_register;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 1, load = 0;
  logic [W-1:0] d = '0, q, expect_q;
  int checks = 0, failures = 0;
  int loads = 0, holds = 0;

  addr_register #(.W(W)) dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, expect_q);
    end
  endtask

  initial begin
    d = 4'hA; load = 1;
    #1 rst_n = 0;
    #1; expect_q = '0; check("in reset");
    @(negedge clk); check("reset holds against load");
    load = 0;
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 2) == 0);
      d    = W'($urandom);
      @(posedge clk);
      if (load) begin expect_q = d; loads++; end else holds++;
      #1 check("after edge");
    end
    rst_n = 0; #1; expect_q = '0; check("async reset");
    checks++;
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
