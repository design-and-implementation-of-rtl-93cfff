// tb_sub_unit: self-checking test of the subtraction unit.
// Corner cases (equal operands, zero minus one, a result that needs a
// borrow) and random pairs; diff must equal a - b modulo 2^32 and borrow
// must be set exactly when b > a.
module tb_sub_unit;
  logic [31:0] a, b, diff;
  logic borrow;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sub_unit #(.N(32)) dut (.a(a), .b(b), .diff(diff), .borrow(borrow));

  task automatic check();
    #1;
    checks++;
    if (diff !== 32'(a - b) || borrow !== (b > a)) begin
      failures++;
      $display("FAIL a=%h b=%h diff=%h borrow=%b", a, b, diff, borrow);
    end
  endtask

  initial begin
    a = 32'd2569; b = 32'd25; check();        // 2544
    a = 32'd0; b = 32'd1; check();
    a = 32'd7; b = 32'd7; check();
    a = '0; b = '1; check();
    a = '1; b = '0; check();
    for (int i = 0; i < 1000; i++) begin
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
