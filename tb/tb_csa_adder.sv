// tb_csa_adder: self-checking test of the carry select adder.
// The 32-bit adder (the ALU's width) gets corner cases and random operands
// with both carry-in values; a 4-bit instance (the basic block width) is
// checked exhaustively, 8- and 16-bit instances with random operands.
// Reference: a + b + cin computed one bit wider.
module tb_csa_adder;
  logic [31:0] a, b, sum;
  logic cin, cout;
  logic [3:0] a4, b4, sum4;
  logic cin4, cout4;
  logic [7:0] a8, b8, sum8;
  logic [15:0] a16, b16, sum16;
  logic cin8, cout8, cin16, cout16;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  csa_adder #(.N(32)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  csa_adder #(.N(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .sum(sum8), .cout(cout8));
  csa_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(cin16), .sum(sum16), .cout(cout16));
  csa_adder #(.N(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .sum(sum4), .cout(cout4));

  task automatic check32();
    logic [32:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + {32'd0, cin};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got=%h exp=%h", a, b, cin, {cout, sum}, exp);
    end
  endtask

  initial begin
    a4 = '0; b4 = '0; cin4 = 1'b0;
    a = '1; b = '0; cin = 1'b1; check32();
    a = '1; b = '1; cin = 1'b1; check32();
    a = '0; b = '0; cin = 1'b0; check32();
    a = 32'd2569; b = 32'd25; cin = 1'b0; check32();
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom); check32();
    end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(x); b4 = 4'(y); cin4 = 1'(c);
          #1;
          checks++;
          if ({cout4, sum4} !== 5'(x + y + c)) begin
            failures++;
            $display("FAIL4 %0d+%0d+%0d got=%0d", x, y, c, {cout4, sum4});
          end
        end
    for (int i = 0; i < 500; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); cin8 = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom);
      #1;
      checks += 2;
      if ({cout8, sum8} !== 9'(a8 + b8 + cin8)) begin
        failures++;
        $display("FAIL8 %0d+%0d+%0d got=%0d", a8, b8, cin8, {cout8, sum8});
      end
      if ({cout16, sum16} !== 17'(a16 + b16 + cin16)) begin
        failures++;
        $display("FAIL16 %0d+%0d+%0d got=%0d", a16, b16, cin16, {cout16, sum16});
      end
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
