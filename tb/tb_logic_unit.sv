// tb_logic_unit: self-checking test of the bitwise logic block.
// Random operand pairs; each of the seven outputs is compared with the
// corresponding expression evaluated in the testbench.
module tb_logic_unit;
  logic [31:0] a, b, y_and, y_or, y_not, y_nand, y_nor, y_xnor, y_xor;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic_unit #(.N(32)) dut (.a(a), .b(b), .y_and(y_and), .y_or(y_or),
                            .y_not(y_not), .y_nand(y_nand), .y_nor(y_nor),
                            .y_xnor(y_xnor), .y_xor(y_xor));

  task automatic cmp(string name, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h got=%h exp=%h", name, a, b, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = $urandom; b = $urandom;
      #1;
      cmp("and",  y_and,  a & b);
      cmp("or",   y_or,   a | b);
      cmp("not",  y_not,  ~a);
      cmp("nand", y_nand, ~(a & b));
      cmp("nor",  y_nor,  ~(a | b));
      cmp("xnor", y_xnor, a ~^ b);
      cmp("xor",  y_xor,  a ^ b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
