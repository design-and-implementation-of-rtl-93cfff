// tb_vedic_mul16: self-checking test of the 16 x 16 Vedic multiplier.
// Corner cases (all ones, powers of two) and 5000 random operand pairs are compared with the product computed by the simulator's own
// multiplication at double width.
module tb_vedic_mul16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  vedic_mul16 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [31:0] exp;
    #1;
    exp = {{16{1'b0}}, a} * {{16{1'b0}}, b};
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h got %h exp %h", a, b, p, exp);
    end
  endtask

  initial begin
    a = '1; b = '1; check();
    a = '0; b = '1; check();
    a = '1; b = 16'd1; check();
    a = {1'b1, {(16-1){1'b0}}}; b = {1'b1, {(16-1){1'b0}}}; check();
    a = 16'(2569); b = 16'(25); check();
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom); b = 16'($urandom); check();
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
