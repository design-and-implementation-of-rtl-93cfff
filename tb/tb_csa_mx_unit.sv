// tb_csa_mx_unit: self-checking test of the carry select multiplexer.
// Random candidate sums and carries with both select values; the output
// must equal the candidate chosen by cin.
module tb_csa_mx_unit;
  localparam int unsigned N = 32;
  logic [N-1:0] s0, s1, sum;
  logic c0, c1, cin, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  csa_mx_unit #(.N(N)) dut (.s0(s0), .c0(c0), .s1(s1), .c1(c1), .cin(cin),
                            .sum(sum), .cout(cout));

  task automatic check();
    #1;
    checks++;
    if ({cout, sum} !== (cin ? {c1, s1} : {c0, s0})) begin
      failures++;
      $display("FAIL cin=%b s0=%h s1=%h sum=%h", cin, s0, s1, sum);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      s0 = $urandom; s1 = $urandom; c0 = 1'($urandom); c1 = ~c0;
      cin = 1'b0; check();
      cin = 1'b1; check();
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
