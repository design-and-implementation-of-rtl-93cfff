// tb_vedic_mul2: exhaustive self-checking test of the 2 x 2 Vedic cell.
// All 16 operand pairs; the product is compared with x * y.
module tb_vedic_mul2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  vedic_mul2 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        a = 2'(x); b = 2'(y);
        #1;
        checks++;
        if (p !== 4'(x * y)) begin
          failures++;
          $display("FAIL %0d*%0d got %0d", x, y, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
