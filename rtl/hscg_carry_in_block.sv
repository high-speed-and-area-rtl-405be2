// hscg_carry_in_block: least significant bit of an HSCG segment of the
// accuracy configurable adder.
//
// A half adder gives h = a XOR b and g = a AND b, an OR gate gives
// p = a OR b and an inverter NOT h. The sum mux is selected by cin
// (h or NOT h), the carry mux by the separate prediction input cpr
// (g or p), so carry = g + p * cpr. Parts and the two select inputs follow
// the design description. The accuracy configurable adder drives both
// selects from the result carry of the prediction mux (see aca_hscg).
//
// Interface: a, b, cin, cpr -> sum, carry. Combinational, no clock.
module hscg_carry_in_block (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic cpr,
  output logic sum,
  output logic carry
);
  logic h, g, p;

  // Half adder and OR gate
  always_comb begin
    h = a ^ b;
    g = a & b;
    p = a | b;
  end

  always_comb begin
    sum   = cin ? ~h : h;
    carry = cpr ? p : g;
  end
endmodule
