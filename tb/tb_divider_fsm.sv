// tb_divider_fsm: self-checking test of the FSM shift-subtract divider.
// Holds each operand pair until the divider reports valid, then compares
// quotient and remainder with a / b and a % b worked out here, and checks
// that the result arrived exactly N + 1 rising edges after the operands
// were applied. Also covers division by zero (quotient all ones,
// remainder = dividend), a divisor larger than the dividend, and an
// operand change in the middle of a division, which must restart it.
module tb_divider_fsm;
  localparam int unsigned N = 32;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] dividend, divisor, quotient, remainder;
  logic busy, valid;
  int checks = 0, failures = 0;
  int restarts = 0;

  always #5 clk = ~clk;

  divider_fsm #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .dividend(dividend),
                            .divisor(divisor), .quotient(quotient),
                            .remainder(remainder), .busy(busy), .valid(valid));

  // Apply operands just after a rising edge, count edges until valid.
  task automatic divide(logic [N-1:0] x, logic [N-1:0] y);
    int cycles;
    logic [N-1:0] eq, er;
    dividend = x; divisor = y;
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
    end while (!valid && cycles < 4 * N);
    eq = (y == 0) ? '1 : x / y;
    er = (y == 0) ? x : x % y;
    checks++;
    if (quotient !== eq || remainder !== er) begin
      failures++;
      $display("FAIL %0d / %0d got q=%0d r=%0d exp q=%0d r=%0d", x, y,
               quotient, remainder, eq, er);
    end
    checks++;
    if (cycles != N + 1) begin
      failures++;
      $display("FAIL latency %0d edges, expected %0d", cycles, N + 1);
    end
  endtask

  initial begin
    dividend = '0; divisor = 32'd1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Reset state: not valid, results zero.
    checks++;
    if (valid || quotient !== '0) begin
      failures++;
      $display("FAIL after reset valid=%b q=%h", valid, quotient);
    end
    // First division after reset starts on its own.
    @(posedge clk); #1;
    wait (valid); @(posedge clk); #1;
    divide(32'd2569, 32'd25);     // 102 remainder 19
    divide(32'd100, 32'd7);
    divide(32'd5, 32'd9);         // divisor above dividend
    divide(32'hFFFF_FFFF, 32'd1);
    divide(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    divide(32'd1234, 32'd0);      // division by zero
    for (int i = 0; i < 40; i++) begin
      logic [N-1:0] x, y;
      x = $urandom;
      y = $urandom >> ($urandom % 32);
      divide(x, y);
    end
    // Operand change mid-division: the old result must not appear as valid
    // for the new operands, and the new division must be correct.
    dividend = 32'd1000; divisor = 32'd3;
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (!busy || valid) begin
      failures++;
      $display("FAIL expected busy mid-division");
    end
    dividend = 32'd999; divisor = 32'd4;
    @(posedge clk); #1;
    restarts++;
    do @(posedge clk); while (!valid);
    #1;
    checks++;
    if (quotient !== 32'd249 || remainder !== 32'd3) begin
      failures++;
      $display("FAIL after restart q=%0d r=%0d", quotient, remainder);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
