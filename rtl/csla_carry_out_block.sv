// csla_carry_out_block: most significant bit of a CSLA segment of the
// accuracy configurable adder.
//
// Two full adders compute the bit for carry in 0 and carry in 1; the carry
// from the sub adder below selects sum and carry. The carry of the carry-in-0
// full adder, which is the bit's generate signal a AND b, leaves the block as
// the predicted carry ca_pre. The accurate carry (carry) and ca_pre both go
// to the carry prediction mux. Structure as described for this block: two
// full adders, two muxes and the ca_pre tap.
//
// Interface: a, b, cin -> sum, carry (accurate carry out), ca_pre.
// Combinational, no clock. ca_pre does not depend on cin, so it is ready
// after one full adder delay, while carry waits for the carry chain below.
module csla_carry_out_block (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic ca_pre
);
  logic s0, c0, s1, c1;

  full_adder u_fa0 (.a(a), .b(b), .cin(1'b0), .sum(s0), .cout(c0));
  full_adder u_fa1 (.a(a), .b(b), .cin(1'b1), .sum(s1), .cout(c1));

  always_comb begin
    sum    = cin ? s1 : s0;
    carry  = cin ? c1 : c0;
    ca_pre = c0;
  end
endmodule
