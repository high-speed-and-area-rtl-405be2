// full_adder: one-bit full adder, the "FA" box of the carry select cells.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational, no
// clock. The carry select sub adder and the CSLA carry-out and carry-in
// blocks each use two of these, one with its carry in tied to 0 and one tied
// to 1. The gate-level form of the full adder is not given by the design
// description; the textbook XOR/majority form is used.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end
endmodule
