// tb_vedic_combine: self-checking test of the adder stage of one Vedic
// multiplier level, at 32 bits (the top level of the ALU's multiplier) and
// at 4 bits. The four partial products are formed here from random
// half-width operands (and from all-ones operands, which make the carries
// of the first two adders rise); the combined result must equal
// q0 + (q1 + q2) * 2^H + q3 * 2^N, the full product of the operands.
module tb_vedic_combine;
  logic [15:0] ah, al, bh, bl;
  logic [31:0] q0, q1, q2, q3;
  logic [63:0] p;
  logic [1:0]  ah4, al4, bh4, bl4;
  logic [3:0]  r0, r1, r2, r3;
  logic [7:0]  p4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  vedic_combine #(.N(32)) dut  (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
  vedic_combine #(.N(4))  dut4 (.q0(r0), .q1(r1), .q2(r2), .q3(r3), .p(p4));

  task automatic check32();
    logic [63:0] exp;
    q0 = 32'(al) * 32'(bl);
    q1 = 32'(ah) * 32'(bl);
    q2 = 32'(al) * 32'(bh);
    q3 = 32'(ah) * 32'(bh);
    #1;
    exp = 64'({ah, al}) * 64'({bh, bl});
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL32 %h%h * %h%h got %h exp %h", ah, al, bh, bl, p, exp);
    end
  endtask

  initial begin
    ah = '1; al = '1; bh = '1; bl = '1; check32();
    ah = '1; al = '0; bh = '0; bl = '1; check32();
    for (int i = 0; i < 3000; i++) begin
      {ah, al} = $urandom; {bh, bl} = $urandom; check32();
    end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        {ah4, al4} = 4'(x); {bh4, bl4} = 4'(y);
        r0 = 4'(al4) * 4'(bl4);
        r1 = 4'(ah4) * 4'(bl4);
        r2 = 4'(al4) * 4'(bh4);
        r3 = 4'(ah4) * 4'(bh4);
        #1;
        checks++;
        if (p4 !== 8'(x * y)) begin
          failures++;
          $display("FAIL4 %0d * %0d got %0d", x, y, p4);
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
