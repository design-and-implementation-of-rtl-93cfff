// tb_vedic_mul32: self-checking test of the 32 x 32 Vedic multiplier.
// Corner cases (all ones, powers of two) and 5000 random operand pairs are compared with the product computed by the simulator's own
// multiplication at double width.
module tb_vedic_mul32;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  vedic_mul32 dut (.a(a), .b(b), .p(p));

  task automatic check();
    logic [63:0] exp;
    #1;
    exp = {{32{1'b0}}, a} * {{32{1'b0}}, b};
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h got %h exp %h", a, b, p, exp);
    end
  endtask

  initial begin
    a = '1; b = '1; check();
    a = '0; b = '1; check();
    a = '1; b = 32'd1; check();
    a = {1'b1, {(32-1){1'b0}}}; b = {1'b1, {(32-1){1'b0}}}; check();
    a = 32'(2569); b = 32'(25); check();
    for (int i = 0; i < 5000; i++) begin
      a = 32'($urandom); b = 32'($urandom); check();
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
