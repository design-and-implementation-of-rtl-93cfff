// tb_vedic_mul8: self-checking test of the 8 x 8 Vedic multiplier.
// Every operand pair is applied (exhaustive) are compared with the product computed by the simulator's own
// multiplication at double width.
module tb_vedic_mul8;
  logic [7:0] a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [15:0] exp;
    #1;
    exp = {{8{1'b0}}, a} * {{8{1'b0}}, b};
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h got %h exp %h", a, b, p, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        check();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
