// csla_sub_adder: W-bit conventional carry select adder (CSLA).
//
// Two ripple carry adders work in parallel on the same operands: the upper
// one with carry in 0, the lower one with carry in 1. The real carry in then
// selects, through one 2:1 mux per sum bit and one for the carry out, which
// of the two results leaves the block. With W = 3 this is the three-bit
// sub adder drawn for bits [2:0] and [7:5] of the 8-bit accuracy
// configurable adder. The structure (two ripple chains plus W+1 muxes)
// follows the design description; the parameterised width is this
// implementation's generalisation.
//
// Interface: a, b (W bits), cin -> sum (W bits), cout. Combinational, no
// clock; the delay from cin is one mux level.
module csla_sub_adder #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  // Ripple chains for carry in 0 and carry in 1. c0[i]/c1[i] is the carry
  // into bit i.
  logic [W:0]   c0, c1;
  logic [W-1:0] s0, s1;

  assign c0[0] = 1'b0;
  assign c1[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa0 (.a(a[i]), .b(b[i]), .cin(c0[i]), .sum(s0[i]), .cout(c0[i+1]));
    full_adder u_fa1 (.a(a[i]), .b(b[i]), .cin(c1[i]), .sum(s1[i]), .cout(c1[i+1]));
  end

  // Selection by the real carry in.
  always_comb begin
    sum  = cin ? s1 : s0;
    cout = cin ? c1[W] : c0[W];
  end
endmodule
