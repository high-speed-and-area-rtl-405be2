// aca_top: the two accuracy configurable adders of the design side by side.
//
// aca_csla (carry select cells) and aca_hscg (half-sum carry generation
// cells) are the two proposed versions of the same N-bit adder with carry
// prediction at segment boundaries. Both receive the same operands, carry in
// and mode, and each brings out its own sum and carry out, so the two can be
// compared bit for bit. In accurate mode (acc_mode = 1) both give a + b + cin;
// in approximate mode (acc_mode = 0) both give the same carry-predicted
// result, which differs from the exact sum only when a boundary bit
// propagates while a carry reaches it. Sharing the inputs is this
// implementation's choice; each adder is a separate design point.
//
// Interface: a, b (N bits), cin, acc_mode -> sum_csla, cout_csla, sum_hscg,
// cout_hscg. Combinational, no clock.
module aca_top #(
  parameter int unsigned N = 8,
  parameter int unsigned L = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic         acc_mode,
  output logic [N-1:0] sum_csla,
  output logic         cout_csla,
  output logic [N-1:0] sum_hscg,
  output logic         cout_hscg
);
  aca_csla #(.N(N), .L(L)) u_csla (
    .a(a), .b(b), .cin(cin), .acc_mode(acc_mode), .sum(sum_csla), .cout(cout_csla)
  );

  aca_hscg #(.N(N), .L(L)) u_hscg (
    .a(a), .b(b), .cin(cin), .acc_mode(acc_mode), .sum(sum_hscg), .cout(cout_hscg)
  );
endmodule
