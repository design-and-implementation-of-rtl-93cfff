// tb_alu_top: end-to-end self-checking test of the 32-bit Vedic ALU at its
// default parameters.
//
// 1. Reference vector a = 2569, b = 25: every opcode is stepped through and
//    o compared with add 2594, sub 2544, mul 64225, div 102, mod 19 and the
//    seven bitwise functions, all worked out in the testbench.
// 2. Random operand pairs under every opcode, including the unused codes
//    (which must give 0); division results are read once div_valid rises,
//    which must take exactly N + 1 clock edges.
// 3. Mechanisms of the design, each counted and required at least once:
//    adder carry out, subtraction with borrow (wrap-around), a full-width
//    product, division by zero, a divider restart when the operands change
//    mid-division, and every opcode.
module tb_alu_top;
  import alu_pkg::*;
  localparam int unsigned N = 32;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] a, b, add, sub, div, mod;
  logic [3:0] sel;
  logic [2*N-1:0] o, multi;
  logic cout, div_busy, div_valid;

  int checks = 0, failures = 0;
  int n_carry = 0, n_borrow = 0, n_wide_mul = 0, n_div0 = 0, n_restart = 0;
  int n_op[16];

  always #5 clk = ~clk;

  alu_top dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .sel(sel), .o(o),
               .add(add), .sub(sub), .multi(multi), .div(div), .mod(mod),
               .cout(cout), .div_busy(div_busy), .div_valid(div_valid));

  function automatic logic [2*N-1:0] model(logic [3:0] op, logic [N-1:0] x,
                                           logic [N-1:0] y);
    logic [N-1:0] r32;
    logic [2*N-1:0] prod;
    prod = {{N{1'b0}}, x} * {{N{1'b0}}, y};
    case (op)
      4'b0000: r32 = x + y;
      4'b0001: r32 = x - y;
      4'b0100: r32 = (y == 0) ? '1 : x / y;
      4'b0101: r32 = (y == 0) ? x : x % y;
      4'b0110: r32 = x & y;
      4'b0111: r32 = x | y;
      4'b1000: r32 = ~x;
      4'b1001: r32 = ~(x & y);
      4'b1010: r32 = ~(x | y);
      4'b1011: r32 = ~(x ^ y);
      4'b1100: r32 = x ^ y;
      default: r32 = '0;
    endcase
    return (op == 4'b0010) ? prod : {{N{1'b0}}, r32};
  endfunction

  // Apply operands, wait for the divider, then check every opcode.
  task automatic run_vector(logic [N-1:0] x, logic [N-1:0] y);
    int cycles;
    logic [N:0] wide_sum;
    a = x; b = y;
    #1;
    cycles = 0;
    do begin
      @(posedge clk); #1;
      cycles++;
    end while (!div_valid && cycles < 4 * N);
    checks++;
    if (cycles != N + 1) begin
      failures++;
      $display("FAIL divider latency %0d edges for %0d/%0d", cycles, x, y);
    end
    for (int op = 0; op < 16; op++) begin
      sel = 4'(op);
      #1;
      checks++;
      if (o !== model(4'(op), x, y)) begin
        failures++;
        $display("FAIL sel=%b a=%0d b=%0d o=%h exp=%h", sel, x, y, o,
                 model(4'(op), x, y));
      end
      n_op[op]++;
    end
    wide_sum = {1'b0, x} + {1'b0, y};
    checks++;
    if (cout !== wide_sum[N]) begin
      failures++;
      $display("FAIL cout a=%h b=%h", x, y);
    end
    if (cout) n_carry++;
    if (y > x) n_borrow++;
    if (multi[2*N-1:N] != '0) n_wide_mul++;
    if (y == 0) n_div0++;
  endtask

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    a = '0; b = 32'd1; sel = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (div_valid);
    @(posedge clk); #1;

    // Reference vector, stepped through the opcodes one by one.
    a = 32'd2569; b = 32'd25;
    #1;
    checks++;
    if (div_valid) begin
      failures++;
      $display("FAIL div_valid stayed high after an operand change");
    end
    wait (div_valid);
    #1;
    sel = OP_ADD;  #1; checks++; if (o !== 64'd2594)  begin failures++; $display("FAIL ref add %0d", o); end
    sel = OP_SUB;  #1; checks++; if (o !== 64'd2544)  begin failures++; $display("FAIL ref sub %0d", o); end
    sel = OP_MUL;  #1; checks++; if (o !== 64'd64225) begin failures++; $display("FAIL ref mul %0d", o); end
    sel = OP_DIV;  #1; checks++; if (o !== 64'd102)   begin failures++; $display("FAIL ref div %0d", o); end
    sel = OP_MOD;  #1; checks++; if (o !== 64'd19)    begin failures++; $display("FAIL ref mod %0d", o); end
    checks++;
    if (add !== 32'd2594 || sub !== 32'd2544 || multi !== 64'd64225 ||
        div !== 32'd102 || mod !== 32'd19) begin
      failures++;
      $display("FAIL ref unit outputs");
    end
    @(posedge clk); #1;

    run_vector(32'd7, 32'd2);
    run_vector(32'd2569, 32'd25);
    run_vector(32'hFFFF_FFFF, 32'd1);          // carry out, wide product
    run_vector(32'd3, 32'd10);                 // borrow
    run_vector(32'hDEAD_BEEF, 32'd0);          // division by zero
    run_vector(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    for (int i = 0; i < 30; i++)
      run_vector($urandom, $urandom >> ($urandom % 32));

    // Change the operands while a division is running.
    a = 32'd1000; b = 32'd3;
    repeat (8) @(posedge clk);
    #1;
    checks++;
    if (!div_busy || div_valid) begin
      failures++;
      $display("FAIL divider should be busy");
    end
    a = 32'd999; b = 32'd4;
    n_restart++;
    do @(posedge clk); while (!div_valid);
    #1;
    sel = OP_DIV; #1; checks++; if (o !== 64'd249) begin failures++; $display("FAIL restart div %0d", o); end
    sel = OP_MOD; #1; checks++; if (o !== 64'd3)   begin failures++; $display("FAIL restart mod %0d", o); end

    // Every mechanism must have happened at least once.
    $display("mechanisms: carry=%0d borrow=%0d wide_mul=%0d div0=%0d restart=%0d",
             n_carry, n_borrow, n_wide_mul, n_div0, n_restart);
    checks++; if (n_carry == 0)    begin failures++; $display("FAIL no carry out seen"); end
    checks++; if (n_borrow == 0)   begin failures++; $display("FAIL no borrow seen"); end
    checks++; if (n_wide_mul == 0) begin failures++; $display("FAIL no wide product seen"); end
    checks++; if (n_div0 == 0)     begin failures++; $display("FAIL no division by zero seen"); end
    checks++; if (n_restart == 0)  begin failures++; $display("FAIL no divider restart seen"); end
    for (int op = 0; op < 16; op++) begin
      checks++;
      if (n_op[op] == 0) begin failures++; $display("FAIL opcode %0d never used", op); end
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
