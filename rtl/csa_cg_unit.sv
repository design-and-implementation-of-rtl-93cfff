// csa_cg_unit: carry and sum generation (CG unit) of the carry select adder.
//
// Takes the half-adder outputs of csa_h_unit and ripples a carry through
// them, starting from the fixed carry-in CIN:
//   c(-1) = CIN,  c(i) = ci(i) | (si(i) & c(i-1)),  s(i) = si(i) ^ c(i-1).
// The adder instantiates it twice, once with CIN = 0 (CG0) and once with
// CIN = 1 (CG1), so that both candidate sums are ready before the real
// carry-in is known. The carry-in being a parameter rather than a port is
// this design's choice: the two units only ever see constants.
// Purely combinational; delay grows linearly with N.
module csa_cg_unit #(
  parameter int unsigned N   = 32,
  parameter bit          CIN = 1'b0
) (
  input  logic [N-1:0] ci,
  input  logic [N-1:0] si,
  output logic [N-1:0] s,
  output logic         cout
);

  always_comb begin
    logic c;  // carry into the bit being processed
    c = CIN;
    for (int unsigned i = 0; i < N; i++) begin
      s[i] = si[i] ^ c;
      c    = ci[i] | (si[i] & c);
    end
    cout = c;
  end

endmodule
