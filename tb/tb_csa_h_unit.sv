// tb_csa_h_unit: self-checking test of the half-adder stage.
// Drives corner values and random 32-bit operand pairs and compares the
// per-bit carry and sum with a & b and a ^ b worked out in the testbench.
module tb_csa_h_unit;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b, ci, si;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  csa_h_unit #(.N(N)) dut (.a(a), .b(b), .ci(ci), .si(si));

  task automatic check();
    #1;
    checks++;
    if (ci !== (a & b) || si !== (a ^ b)) begin
      failures++;
      $display("FAIL a=%h b=%h ci=%h si=%h", a, b, ci, si);
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = '1; b = '0; check();
    a = 32'hAAAA_5555; b = 32'h5555_AAAA; check();
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
