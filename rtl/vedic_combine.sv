// vedic_combine: the adder stage of one level of the Vedic multiplier.
//
// A 2H x 2H multiplier (N = 2H bits per operand) splits a = aH:aL and
// b = bH:bL and gets four N-bit partial products from half-size
// multipliers: q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH. This block
// adds them with three N-bit carry select adders:
//   csa1: t = q1 + q2                       carry out ca1
//   csa2: u = t + (q0 >> H)                 carry out ca2
//   csa3: v = q3 + {ca1|ca2, u[N-1:H]}      carry out unused
//   p = {v, u[H-1:0], q0[H-1:0]}
// ca1 and ca2 both weigh 2^(N+H) in the product. They cannot both be 1,
// since t + (q0 >> H) < 2^(N+1), so their OR is exact. The carry out of
// csa3 is left open on purpose: the product always fits in 2N bits, so it
// is constant 0. Feeding the two carries into the third adder's operand is
// this design's reading of the 4 x 4 schematic, where both enter that adder.
// Purely combinational. N must be even and at least 4.
module vedic_combine #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] p
);

  localparam int unsigned H = N / 2;

  logic [N-1:0] t, u, v;
  logic [N-1:0] q0_hi, u_hi;
  logic         ca1, ca2, ca3;

  always_comb begin
    q0_hi = {{H{1'b0}}, q0[N-1:H]};
    u_hi  = {{(H-1){1'b0}}, ca1 | ca2, u[N-1:H]};
  end

  csa_adder #(.N(N)) u_csa1 (.a(q1), .b(q2),    .cin(1'b0), .sum(t), .cout(ca1));
  csa_adder #(.N(N)) u_csa2 (.a(t),  .b(q0_hi), .cin(1'b0), .sum(u), .cout(ca2));
  csa_adder #(.N(N)) u_csa3 (.a(q3), .b(u_hi),  .cin(1'b0), .sum(v), .cout(ca3));

  always_comb p = {v, u[H-1:0], q0[H-1:0]};

endmodule
