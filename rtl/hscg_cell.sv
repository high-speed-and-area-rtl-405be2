// hscg_cell: one bit of the half-sum carry generation (HSCG) based square
// root carry select adder; also serves as the carry-out block of an HSCG
// segment of the accuracy configurable adder.
//
// The HSCG unit forms the half sum h = a XOR b and the two candidate
// carries a AND b (carry in 0) and a OR b (carry in 1). An inverter gives
// NOT h, the sum for carry in 1. Two 2:1 muxes controlled by cin pick the
// sum (h or NOT h) and the carry (a AND b or a OR b). The AND output also
// leaves the cell as cpre, the predicted carry used at a segment boundary.
// Four gates and two muxes, as the design describes them.
//
// Interface: a, b, cin -> sum, carry, cpre. Combinational, no clock.
module hscg_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cpre
);
  logic h, h_n, g, p;

  // HSCG unit and inverter
  always_comb begin
    h   = a ^ b;
    g   = a & b;
    p   = a | b;
    h_n = ~h;
  end

  // Sum and carry selection
  always_comb begin
    sum   = cin ? h_n : h;
    carry = cin ? p : g;
    cpre  = g;
  end
endmodule
