// tb_csa_cg_unit: self-checking test of the carry and sum generation unit.
// Two instances, one with fixed carry-in 0 (CG0) and one with 1 (CG1), are
// fed the half-adder signals of random operand pairs (computed here as
// a & b and a ^ b); their sum and carry out are compared with a + b + CIN.
module tb_csa_cg_unit;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b, ci, si, s0, s1;
  logic c0, c1;
  logic [N:0] exp0, exp1;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  assign ci = a & b;
  assign si = a ^ b;

  csa_cg_unit #(.N(N), .CIN(1'b0)) dut0 (.ci(ci), .si(si), .s(s0), .cout(c0));
  csa_cg_unit #(.N(N), .CIN(1'b1)) dut1 (.ci(ci), .si(si), .s(s1), .cout(c1));

  task automatic check();
    #1;
    exp0 = {1'b0, a} + {1'b0, b};
    exp1 = {1'b0, a} + {1'b0, b} + 1'b1;
    checks += 2;
    if ({c0, s0} !== exp0) begin
      failures++;
      $display("FAIL CG0 a=%h b=%h got=%h exp=%h", a, b, {c0, s0}, exp0);
    end
    if ({c1, s1} !== exp1) begin
      failures++;
      $display("FAIL CG1 a=%h b=%h got=%h exp=%h", a, b, {c1, s1}, exp1);
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '0; check();   // carry-in 1 must ripple through every bit
    a = '1; b = '1; check();
    a = 32'h8000_0000; b = 32'h8000_0000; check();
    for (int i = 0; i < 500; i++) begin
      a = $urandom; b = $urandom; check();
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
