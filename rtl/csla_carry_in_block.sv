// csla_carry_in_block: least significant bit of a CSLA segment of the
// accuracy configurable adder.
//
// Like the carry-out block it holds two full adders, one with carry in 0 and
// one with carry in 1, and two muxes. The difference is that the two muxes
// have separate select inputs: cin selects the sum, cpr (the carry
// prediction input) selects the carry out. With cpr equal to the predicted
// carry g_i of the bit below, carry = g_(i+1) + p_(i+1) * g_i, the predicted
// carry equation of the design. The accuracy configurable adders drive both
// selects from the result carry of the prediction mux (see aca_csla); the
// separate pins are kept as the block is described.
//
// Interface: a, b, cin, cpr -> sum, carry. Combinational, no clock.
module csla_carry_in_block (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic cpr,
  output logic sum,
  output logic carry
);
  logic s0, c0, s1, c1;

  full_adder u_fa0 (.a(a), .b(b), .cin(1'b0), .sum(s0), .cout(c0));
  full_adder u_fa1 (.a(a), .b(b), .cin(1'b1), .sum(s1), .cout(c1));

  always_comb begin
    sum   = cin ? s1 : s0;
    carry = cpr ? c1 : c0;
  end
endmodule
